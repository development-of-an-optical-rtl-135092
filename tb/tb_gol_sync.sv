// Self-checking test of gol_sync: random event words, start flags, test
// mode and GOL ready lines; one clock later the lower half must be on GOL A
// and the upper half on GOL B with the right enable and flag, the test word
// must replace the event in test mode, and a word sent to a GOL that is not
// ready must raise link_lost.
module tb_gol_sync;
  logic clk = 0, rst_n = 0;
  logic test_mode = 0, ev_valid = 0, ev_sof = 0;
  logic [31:0] test_word = '0, ev_word = '0;
  logic [1:0] gol_ready = 2'b11;
  logic [15:0] a_d, b_d;
  logic a_en, a_flag, b_en, b_flag, lost;
  int checks = 0, failures = 0, n_test = 0, n_lost = 0, n_flag = 0;

  gol_sync dut (.clk, .rst_n, .test_mode, .test_word, .ev_valid, .ev_sof, .ev_word, .gol_ready,
    .gol_a_d(a_d), .gol_a_en(a_en), .gol_a_flag(a_flag),
    .gol_b_d(b_d), .gol_b_en(b_en), .gol_b_flag(b_flag), .link_lost(lost));
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] w;
  logic en, fl;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      test_mode = ($urandom_range(0, 9) == 0);
      ev_valid  = ($urandom_range(0, 3) != 0);
      ev_sof    = ($urandom_range(0, 5) == 0);
      ev_word   = $urandom;
      test_word = $urandom;
      gol_ready = ($urandom_range(0, 19) == 0) ? 2'($urandom) : 2'b11;
      w  = test_mode ? test_word : (ev_valid ? ev_word : 32'h0);
      en = test_mode || ev_valid;
      fl = !test_mode && ev_valid && ev_sof;
      @(posedge clk); #1;
      check(a_d == (gol_ready[0] ? w[15:0] : 16'h0) && a_en == (gol_ready[0] && en) &&
            a_flag == (gol_ready[0] && fl), "GOL A");
      check(b_d == (gol_ready[1] ? w[31:16] : 16'h0) && b_en == (gol_ready[1] && en) &&
            b_flag == (gol_ready[1] && fl), "GOL B");
      check(lost == (en && !test_mode && gol_ready != 2'b11), "link_lost");
      if (test_mode) n_test++;
      if (lost) n_lost++;
      if (a_flag) n_flag++;
    end
    check(n_test > 0 && n_lost > 0 && n_flag > 0, "test mode, lost link and flag all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
