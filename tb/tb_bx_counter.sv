// Self-checking test of bx_counter at its default size: the count must wrap
// from 3562 to 0 (3563 crossings per turn), stop while ce is low and return
// to 0 after a bunch counter reset. A reference count kept in the testbench
// is compared every clock.
module tb_bx_counter;
  logic clk = 0, rst_n = 0, ce = 0, bcr = 0;
  logic [11:0] bxid;
  int checks = 0, failures = 0;
  int ref_cnt = 0, wraps = 0;

  bx_counter dut (.clk, .rst_n, .ce, .bcr, .bxid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9000; i++) begin
      @(negedge clk);
      ce  = ($urandom_range(0, 9) != 0);
      bcr = (i == 5000);
      @(posedge clk);
      if (ce) begin
        if (bcr || ref_cnt == 3562) begin
          if (!bcr) wraps++;
          ref_cnt = 0;
        end else ref_cnt++;
      end
      #1;
      checks++;
      if (bxid != 12'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %0d want %0d", i, bxid, ref_cnt);
      end
    end
    checks++;
    if (wraps < 1) begin failures++; $display("count never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
