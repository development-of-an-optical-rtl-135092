// QDR write state machine.
//
// Stores one 4-word burst (one 18-bit word from each of the four fibres) per
// bunch crossing in the QDR SRAM. The machine runs at 160 MHz, twice the QDR
// K clock (80 MHz), so each state lasts one K edge. The state graph and the
// per-state outputs are those of the document's write state machine figure:
//   IDLE     -> ADDRESS  when GET_DATA and K is high (so ADDRESS falls in the
//                        half period that ends with a rising K edge)
//   ADDRESS  -> WR_D1    WPS# low, address out, read held off
//   WR_D1    -> WR_D2    on a rising K edge; DATA1 on D
//   WR_D2    -> ADDRESS2 if GET_DATA again, else WR_D3; DATA2 on D
//   ADDRESS2 -> WR_D4    next address with WPS# low, DATA3 on D, continue set
//   WR_D3    -> WR_D4    DATA3 on D
//   WR_D4    -> WR_D1 if continue, else IDLE; DATA4 on D
// With GET_DATA present every bunch crossing the machine loops WR_D1,
// WR_D2, ADDRESS2, WR_D4: one address every second rising K edge and a data
// word on every K edge, 4 words per 25 ns.
//
// QDR timing as modelled here: a cycle with k == 0 ends on a rising K edge,
// one with k == 1 on a rising K# edge. WPS# and A are taken at the rising K
// edge ending the ADDRESS cycle; the four words are taken at the next rising
// K edge and the three edges after it. The clock arrangement (160 MHz
// state clock with the K phase as a signal) and the point where the address
// counter advances (when the address is issued, rather than in WR_D1) are
// this design's choices. States are one-hot, as in the document.
//
// hold_read is high in the cycles in which this machine issues an address,
// so the read machine must not use that rising K edge.
module qdr_write_fsm
  import rich_pkg::*;
(
  input  logic                  clk,        // 160 MHz
  input  logic                  rst_n,
  input  logic                  k,          // K clock level in this cycle
  input  logic                  get_data,   // a burst is waiting
  input  qdr_burst_t            data_in,    // the waiting burst
  output logic                  take,       // burst accepted, address used
  input  logic [QDR_ADDR_W-1:0] wr_addr,    // from the wrap-around counter
  output logic                  wps_n,
  output logic [QDR_ADDR_W-1:0] sa,
  output qdr_word_t             d,
  output logic                  hold_read
);
  typedef enum logic [6:0] {
    IDLE     = 7'b0000001,
    ADDRESS  = 7'b0000010,
    WR_D1    = 7'b0000100,
    WR_D2    = 7'b0001000,
    ADDRESS2 = 7'b0010000,
    WR_D3    = 7'b0100000,
    WR_D4    = 7'b1000000
  } wstate_t;

  wstate_t    state, nxt;
  logic       cont;
  qdr_burst_t next_b, cur_b;

  always_comb begin
    nxt = state;
    unique case (state)
      IDLE:     if (get_data && k) nxt = ADDRESS;
      ADDRESS:  nxt = WR_D1;
      WR_D1:    if (!k) nxt = WR_D2;
      WR_D2:    nxt = get_data ? ADDRESS2 : WR_D3;
      ADDRESS2: nxt = WR_D4;
      WR_D3:    nxt = WR_D4;
      WR_D4:    nxt = cont ? WR_D1 : IDLE;
      default:  nxt = IDLE;
    endcase
  end

  assign hold_read = (state == ADDRESS) || (state == ADDRESS2);
  assign take      = hold_read;
  assign wps_n     = !hold_read;
  assign sa        = wr_addr;

  always_comb begin
    unique case (state)
      WR_D1:             d = cur_b[0];
      WR_D2:             d = cur_b[1];
      ADDRESS2, WR_D3:   d = cur_b[2];
      WR_D4:             d = cur_b[3];
      default:           d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      cont   <= 1'b0;
      next_b <= '0;
      cur_b  <= '0;
    end else begin
      state <= nxt;
      if (state == ADDRESS)  cont <= 1'b0;
      if (state == ADDRESS2) cont <= 1'b1;
      if (state == WR_D4)    cont <= 1'b0;
      if (take)              next_b <= data_in;
      if (nxt == WR_D1 && state != WR_D1) cur_b <= take ? data_in : next_b;
    end
  end

  // the write address is issued only on a rising K edge
  a_wps_on_k: assert property (@(posedge clk) disable iff (!rst_n) !wps_n |-> !k)
    else $error("WPS# issued on a K# edge");
endmodule
