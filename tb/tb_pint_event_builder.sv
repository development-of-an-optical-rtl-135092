// Self-checking test of pint_event_builder. The testbench plays the BX FIFO
// (a queue of IDs) and the pixel chip (32 random rows per event, with random
// gaps or back to back), pulses an error bit before some events, and
// compares every output word with the reference event (header, error word,
// rows, column parity, per-half CRC) computed in tb_rich_pkg. It also checks
// that an event occupies exactly 36 consecutive clocks, that two buffered
// events leave without a gap, and that rows pushed into a full buffer raise
// buf_overflow.
module tb_pint_event_builder;
  import tb_rich_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [31:0] pix_row = '0, err_set = '0;
  logic bx_empty, bx_pop;
  logic [11:0] bx_head;
  logic ev_valid, ev_sof, buf_ovf;
  logic [31:0] ev_word;
  int checks = 0, failures = 0;

  pint_event_builder dut (.clk, .rst_n, .pix_valid, .pix_row, .bx_empty, .bx_head, .bx_pop,
    .err_set, .ev_valid, .ev_sof, .ev_word, .buf_overflow(buf_ovf));
  always #5 clk = ~clk;

  logic [11:0] bxq[$];
  assign bx_empty = (bxq.size() == 0);
  assign bx_head  = bx_empty ? 12'h0 : bxq[0];
  always @(posedge clk) if (bx_pop && !bx_empty) void'(bxq.pop_front());

  ev_t expq[$];
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // output monitor
  int widx = -1, n_events = 0, n_b2b = 0, last_end = -100, cyc = 0;
  ev_t cur;
  always @(posedge clk) begin
    cyc++;
    if (ev_valid) begin
      if (ev_sof) begin
        check(widx == -1, "header only after a complete event");
        if (expq.size() == 0) begin check(0, "unexpected event"); cur = '0; end
        else cur = expq.pop_front();
        widx = 0;
        if (last_end == cyc - 1) n_b2b++;
      end
      if (widx >= 0) begin
        check(ev_word == cur[widx], $sformatf("word %0d: got %h want %h", widx, ev_word, cur[widx]));
        if (widx == 35) begin widx = -1; n_events++; last_end = cyc; end
        else widx++;
      end else check(0, "word outside an event");
    end else check(widx == -1, "gap inside an event");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rows_t rows;
  logic [11:0] bx;
  logic [31:0] err;
  int n_ovf = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      bx  = 12'($urandom_range(0, 3562));
      err = '0;
      for (int r = 0; r < 32; r++) rows[r] = $urandom;
      // an error bit set while the builder is idle appears in the next event
      if (e % 5 == 1) begin
        while (ev_valid || !bx_empty) @(posedge clk);
        @(negedge clk);
        err = 32'(1) << $urandom_range(0, 31);
        err_set = err;
        @(negedge clk);
        err_set = '0;
      end
      expq.push_back(ref_event(bx, err, rows));
      @(negedge clk);
      bxq.push_back(bx);
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        pix_valid = 1;
        pix_row   = rows[r];
        if (e % 3 == 0) begin @(negedge clk); pix_valid = 0; end
      end
      @(negedge clk); pix_valid = 0;
    end
    while (expq.size() != 0 || widx != -1) @(posedge clk);
    check(n_events == 40, "all events sent");
    check(n_b2b > 0, "back-to-back events without a gap");
    // overflow: 70 rows without a BX ID fill the 64-row buffer
    for (int r = 0; r < 70; r++) begin
      @(negedge clk); pix_valid = 1; pix_row = r;
      #1; if (buf_ovf) n_ovf++;
    end
    @(negedge clk); pix_valid = 0;
    check(n_ovf == 6, $sformatf("buffer overflow flagged for the 6 extra rows (%0d)", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
