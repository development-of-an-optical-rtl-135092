// IEEE 1149.1 test access port state machine.
//
// The PInt is configured by the Experiment Control System over JTAG; the
// document specifies a standard 16-state TAP controller that follows the TMS
// sequence sent by the ECS. This is that machine, clocked by TCK and
// reset asynchronously by TRST* (five TCK cycles with TMS high also reach
// Test-Logic-Reset). The state uses the usual 4-bit TAP encoding; decoded
// strobes tell the registers behind the TAP when to capture, shift and
// update.
//
// Timing: state advances on the rising edge of TCK. shift_ir/shift_dr are
// high during the Shift states; capture_* and update_* are high for the one
// TCK cycle spent in the Capture and Update states.
module tap_controller (
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  output logic test_logic_reset,
  output logic capture_dr,
  output logic shift_dr,
  output logic update_dr,
  output logic capture_ir,
  output logic shift_ir,
  output logic update_ir,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    TLR        = 4'hF, RTI        = 4'hC,
    SEL_DR     = 4'h7, CAPTURE_DR = 4'h6, SHIFT_DR = 4'h2, EXIT1_DR = 4'h1,
    PAUSE_DR   = 4'h3, EXIT2_DR   = 4'h0, UPDATE_DR = 4'h5,
    SEL_IR     = 4'h4, CAPTURE_IR = 4'hE, SHIFT_IR = 4'hA, EXIT1_IR = 4'h9,
    PAUSE_IR   = 4'hB, EXIT2_IR   = 4'h8, UPDATE_IR = 4'hD
  } tap_state_t;

  tap_state_t state, nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR        : RTI;
      RTI:        nxt = tms ? SEL_DR     : RTI;
      SEL_DR:     nxt = tms ? SEL_IR     : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR   : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR   : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR  : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR   : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR  : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR     : RTI;
      SEL_IR:     nxt = tms ? TLR        : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR   : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR   : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR  : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR   : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR  : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR     : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  assign test_logic_reset = (state == TLR);
  assign capture_dr       = (state == CAPTURE_DR);
  assign shift_dr         = (state == SHIFT_DR);
  assign update_dr        = (state == UPDATE_DR);
  assign capture_ir       = (state == CAPTURE_IR);
  assign shift_ir         = (state == SHIFT_IR);
  assign update_ir        = (state == UPDATE_IR);
  assign state_o          = state;
endmodule
