// QDR read state machine.
//
// Reads one 4-word burst from the QDR SRAM per request and hands it on as a
// 72-bit burst. It works like the write machine but is driven by the read
// request and by the write machine's hold_read: a read address (RPS# low)
// may only be issued on a rising K edge that the write machine leaves free,
// because WPS# and RPS# must never be sampled on the same rising K edge.
// Writes therefore always have priority; with continuous writes the reads
// take the alternate rising K edges.
//   R_IDLE -> R_WAIT   issue RPS# in a cycle ending on rising K, if free
//   R_WAIT -> R_Q1     (one K half period)
//   R_Q1..R_Q4         capture the four words, on the rising K edge after
//                      the address edge and the three edges after it
//   R_Q3               may issue the next read address (continuous reads)
//   R_Q4 -> R_Q1 if a read was issued in R_Q3, else R_IDLE
// The document says only that the read machine is very similar to the
// write machine, with other control signals; the states above are this
// design's, mirroring the write machine so reads also sustain one burst per
// 25 ns when the writes leave the edges free.
//
// Timing: rd_valid pulses one clock after the fourth word is captured.
module qdr_read_fsm
  import rich_pkg::*;
(
  input  logic                  clk,        // 160 MHz
  input  logic                  rst_n,
  input  logic                  k,
  input  logic                  hold_read,  // write machine owns this rising K edge
  input  logic                  rd_req,     // a burst should be read
  input  logic [QDR_ADDR_W-1:0] rd_addr,
  output logic                  issue,      // RPS# issued this cycle
  output logic                  rps_n,
  output logic [QDR_ADDR_W-1:0] sa,
  input  qdr_word_t             q,
  output logic                  rd_valid,
  output qdr_burst_t            rd_burst
);
  typedef enum logic [5:0] {
    R_IDLE = 6'b000001,
    R_WAIT = 6'b000010,
    R_Q1   = 6'b000100,
    R_Q2   = 6'b001000,
    R_Q3   = 6'b010000,
    R_Q4   = 6'b100000
  } rstate_t;

  rstate_t    state, nxt;
  logic       cont;
  qdr_burst_t cap;

  assign issue = (state == R_IDLE || state == R_Q3) && !k && rd_req && !hold_read;
  assign rps_n = !issue;
  assign sa    = rd_addr;

  always_comb begin
    nxt = state;
    unique case (state)
      R_IDLE:  if (issue) nxt = R_WAIT;
      R_WAIT:  nxt = R_Q1;
      R_Q1:    nxt = R_Q2;
      R_Q2:    nxt = R_Q3;
      R_Q3:    nxt = R_Q4;
      R_Q4:    nxt = cont ? R_Q1 : R_IDLE;
      default: nxt = R_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      cont     <= 1'b0;
      cap      <= '0;
      rd_valid <= 1'b0;
      rd_burst <= '0;
    end else begin
      state    <= nxt;
      rd_valid <= 1'b0;
      if (state == R_Q3) cont <= issue;
      if (state == R_Q1) cap[0] <= q;
      if (state == R_Q2) cap[1] <= q;
      if (state == R_Q3) cap[2] <= q;
      if (state == R_Q4) begin
        rd_burst <= {q, cap[2], cap[1], cap[0]};
        rd_valid <= 1'b1;
      end
    end
  end

  a_rps_free_edge: assert property (@(posedge clk) disable iff (!rst_n) issue |-> !hold_read && !k)
    else $error("RPS# on the write machine's edge or on K#");
endmodule
