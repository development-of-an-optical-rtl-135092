// Self-checking test of sync_fifo at its default size (16 x 12 bit, the BX
// ID FIFO). Random pushes and pops, including pushes into a full FIFO and
// pops from an empty one, are checked against a queue model: head word,
// count, full and empty.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [11:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [11:0] q[$];

  sync_fifo dut (.clk, .rst_n, .push, .wr_data, .pop, .rd_data, .full, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // bias towards filling in the first half, emptying in the second
      push    = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 70 : 30));
      pop     = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 30 : 70));
      wr_data = 12'($urandom);
      check(count == 5'(q.size()), "count");
      check(full == (q.size() == 16), "full");
      check(empty == (q.size() == 0), "empty");
      if (q.size() > 0) check(rd_data == q[0], "head");
      if (q.size() == 16) fulls++;
      if (q.size() == 0) empties++;
      @(posedge clk);
      if (pop && q.size() > 0) begin
        if (push && q.size() < 16) q.push_back(wr_data);
        void'(q.pop_front());
      end else if (push && q.size() < 16) q.push_back(wr_data);
    end
    check(fulls > 0 && empties > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
