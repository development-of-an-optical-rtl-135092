// Behavioural model of the pixel chip's DAC configuration chain, used by
// the testbenches only: 44 DACs of 8 bits form one 352-bit shift register
// that shifts (LSB out first) on rising TCK while shift is high and is
// copied to the DAC registers on update.
module pixel_dac_chain_model #(
  parameter int unsigned N_DAC = 44
) (
  input  logic               tck,
  input  logic               shift,
  input  logic               update,
  input  logic               sdi,
  output logic               sdo,
  output logic [N_DAC*8-1:0] dac
);
  logic [N_DAC*8-1:0] chain = '0;
  initial dac = '0;
  always_ff @(posedge tck) begin
    if (shift)  chain <= {sdi, chain[N_DAC*8-1:1]};
    if (update) dac <= chain;
  end
  assign sdo = chain[0];
endmodule
