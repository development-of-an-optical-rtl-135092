// Behavioural stand-in for one optical link (GOL serialiser, VCSEL, fibre,
// receiver and deserialiser), used by the testbenches only. It delivers the
// 16-bit word, data-valid and flag presented to the GOL DELAY bunch
// crossings later on the receiver outputs. flip_mask is XORed into the
// word as it enters the link to imitate a transmission error; rx_err reports the
// receiver's error flag (never set by this model).
module link_model #(
  parameter int unsigned DELAY = 3
) (
  input  logic        clk40,
  input  logic [15:0] gol_d,
  input  logic        gol_en,
  input  logic        gol_flag,
  input  logic [15:0] flip_mask,
  output logic [15:0] rx_d,
  output logic        rx_valid,
  output logic        rx_flag,
  output logic        rx_err
);
  logic [17:0] pipe [DELAY];
  initial for (int i = 0; i < DELAY; i++) pipe[i] = '0;
  always @(posedge clk40) begin
    pipe[0] <= {gol_en, gol_flag, gol_d ^ flip_mask};
    for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
  end
  assign rx_d     = pipe[DELAY-1][15:0];
  assign rx_valid = pipe[DELAY-1][17];
  assign rx_flag  = pipe[DELAY-1][16];
  assign rx_err   = 1'b0;
endmodule
