// GOL control and synchronisation.
//
// Each HPD is read out over two fibres, each driven by a GOL serialiser that
// takes 16 data bits per 25 ns bunch crossing (640 Mbit/s of payload in
// G-Link mode). This block cuts every 32-bit PInt word into its upper half
// (fibre B) and lower half (fibre A) and presents both to the GOLs on the
// same clock, with the G-Link data-valid (en) and flag lines: flag marks the
// header word so the receiver can find the start of an event. In link test
// mode the test pattern is sent instead, with en high and flag low. While a
// GOL reports that it is not ready (not locked), words are dropped and
// link_lost pulses so the error can be flagged.
// The 16-bit split onto two GOLs follows the document; the use of the flag
// line as event marker and the lock handling are this design's choices.
//
// Timing: registered, one clock from input to GOL pins.
module gol_sync (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_mode,
  input  logic [31:0] test_word,
  input  logic        ev_valid,
  input  logic        ev_sof,
  input  logic [31:0] ev_word,
  input  logic [1:0]  gol_ready,
  output logic [15:0] gol_a_d,
  output logic        gol_a_en,
  output logic        gol_a_flag,
  output logic [15:0] gol_b_d,
  output logic        gol_b_en,
  output logic        gol_b_flag,
  output logic        link_lost
);
  logic [31:0] w;
  logic        en, flag;

  always_comb begin
    if (test_mode) begin
      w = test_word; en = 1'b1; flag = 1'b0;
    end else begin
      w = ev_valid ? ev_word : '0; en = ev_valid; flag = ev_valid && ev_sof;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gol_a_d <= '0; gol_a_en <= 1'b0; gol_a_flag <= 1'b0;
      gol_b_d <= '0; gol_b_en <= 1'b0; gol_b_flag <= 1'b0;
      link_lost <= 1'b0;
    end else begin
      gol_a_d    <= gol_ready[0] ? w[15:0]  : '0;
      gol_a_en   <= gol_ready[0] && en;
      gol_a_flag <= gol_ready[0] && flag;
      gol_b_d    <= gol_ready[1] ? w[31:16] : '0;
      gol_b_en   <= gol_ready[1] && en;
      gol_b_flag <= gol_ready[1] && flag;
      link_lost  <= en && !test_mode && (gol_ready != 2'b11);
    end
  end
endmodule
