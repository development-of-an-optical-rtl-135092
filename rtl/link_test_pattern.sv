// Link test pattern generator.
//
// When the ECS switches the PInt to link test mode, the two fibres carry a
// known sequence instead of event data, so that the Level-1 side can check
// the GOL, VCSEL, fibre and receiver chain word by word. The document only
// names this block; the pattern is this design's choice: a 16-bit counter
// in the lower half and its complement in the upper half, which toggles
// every bit line and lets the receiver predict each word from the previous
// one (next = {~(c+1), c+1}).
//
// Interface: en advances the pattern each clock; word is the current word.
// The counter restarts from zero when en falls, so a test run always begins
// at {16'hFFFF, 16'h0000}.
module link_test_pattern (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] word
);
  logic [15:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (en)  cnt <= cnt + 1'b1;
    else          cnt <= '0;
  end
  assign word = {~cnt, cnt};
endmodule
