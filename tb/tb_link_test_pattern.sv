// Self-checking test of link_test_pattern: while enabled the word must be
// {~c, c} with c counting up by one per clock from zero (wrapping at 16
// bits); disabling restarts the sequence.
module tb_link_test_pattern;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] word;
  int checks = 0, failures = 0, wraps = 0;
  int c = 0;

  link_test_pattern dut (.clk, .rst_n, .en, .word);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 140000; i++) begin
      @(negedge clk);
      checks++;
      if (word != {~16'(c), 16'(c)}) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d: %h, expected count %0d", i, word, c);
      end
      en = !(i > 70000 && i < 70010);
      @(posedge clk);
      if (en) begin
        if (c == 65535) wraps++;
        c = (c + 1) % 65536;
      end else c = 0;
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
