// Self-checking test of l1_rx_check. Random events are built with the
// reference in tb_rich_pkg and one 16-bit half is sent as a fibre would,
// one word every fourth clock (ce), header flagged. Each event gets one
// kind of damage: none, wrong BX ID, a flipped data bit (parity and CRC
// fail), a flipped trailer bit (CRC fails only), a receiver error on word 1,
// a bad marker nibble. Every 18-bit output word is compared with
// {rx_err, expected check bit, data} and the error pulses are counted.
module tb_l1_rx_check;
  import tb_rich_pkg::*;
  import rich_pkg::CHK_START, rich_pkg::CHK_MARK, rich_pkg::CHK_BXID, rich_pkg::CHK_RXERR, rich_pkg::CHK_EVID,
         rich_pkg::CHK_PARITY, rich_pkg::CHK_CRC;
  logic clk = 0, rst_n = 0, ce = 0;
  logic rx_valid = 0, rx_flag = 0, rx_err = 0;
  logic [15:0] rx_d = '0;
  logic [11:0] expected_bxid = '0;
  logic [1:0]  event_id = '0;
  logic hdr_seen, out_valid, e_bx, e_par, e_crc, e_sync, t_ok, t_err;
  logic [17:0] out_word;
  logic [5:0] out_idx;
  int checks = 0, failures = 0;
  int n_bx = 0, n_par = 0, n_crc = 0, n_hdr = 0, n_sync = 0, n_tok = 0, n_terr = 0;

  l1_rx_check dut (.clk, .rst_n, .ce, .rx_valid, .rx_flag, .rx_err, .rx_d, .expected_bxid, .event_id,
    .hdr_seen, .out_valid, .out_word, .out_idx, .err_bxid(e_bx), .err_parity(e_par),
    .err_crc(e_crc), .err_sync(e_sync), .test_ok(t_ok), .test_err(t_err));
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (e_bx) n_bx++;
    if (e_par) n_par++;
    if (e_crc) n_crc++;
    if (hdr_seen) n_hdr++;
    if (e_sync) n_sync++;
    if (t_ok) n_tok++;
    if (t_err) n_terr++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ev_t ev;
  rows_t rows;
  logic [15:0] w [36];
  logic [35:0] chk;
  logic [11:0] bx;
  int kind, exp_bx = 0, exp_par = 0, exp_crc = 0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int e = 0; e < 60; e++) begin
      kind = e % 6;
      bx = 12'($urandom_range(0, 3562));
      for (int r = 0; r < 32; r++) rows[r] = $urandom;
      ev = ref_event(bx, $urandom, rows);
      for (int i = 0; i < 36; i++) w[i] = (e % 2) ? ev[i][31:16] : ev[i][15:0];
      chk = '0;
      chk[CHK_START] = 1;
      event_id = 2'($urandom);
      chk[CHK_EVID +: 2] = event_id;
      expected_bxid = bx;
      case (kind)
        1: begin expected_bxid = bx ^ 12'h040; chk[CHK_BXID] = 1; exp_bx++; end
        2: begin w[7][3] = ~w[7][3]; chk[CHK_PARITY] = 1; chk[CHK_CRC] = 1; exp_par++; exp_crc++; end
        3: begin w[35][0] = ~w[35][0]; chk[CHK_CRC] = 1; exp_crc++; end
        4: chk[CHK_RXERR] = 1;
        5: begin w[0][15] = ~w[0][15]; chk[CHK_MARK] = 1; chk[CHK_CRC] = 1; exp_crc++; end
        default: ;
      endcase
      for (int i = 0; i < 36; i++) begin
        @(negedge clk); ce = 1; rx_valid = 1; rx_flag = (i == 0); rx_d = w[i];
        rx_err = (kind == 4 && i == 1);
        @(negedge clk); ce = 0;
        if (i == 0) event_id = ~event_id;       // must have been taken with the header
        check(out_valid && out_idx == 6'(i) &&
              out_word == {rx_err, chk[i], w[i]},
              $sformatf("event %0d word %0d: got %h want %h", e, i, out_word, {rx_err, chk[i], w[i]}));
        repeat (2) @(negedge clk);
      end
      // idle words in between
      @(negedge clk); ce = 1; rx_valid = 0; rx_flag = 0;
      @(negedge clk); ce = 0;
      check(!out_valid, "no output while idle");
    end
    check(n_bx == exp_bx, $sformatf("BX errors %0d of %0d", n_bx, exp_bx));
    check(n_par == exp_par, $sformatf("parity errors %0d of %0d", n_par, exp_par));
    check(n_crc == exp_crc, $sformatf("CRC errors %0d of %0d", n_crc, exp_crc));
    check(n_hdr == 60 && n_sync == 0 && n_tok == 0 && n_terr == 0, "headers seen, no framing error");
    // a header in the middle of an event is a framing error
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); ce = 1; rx_valid = 1; rx_flag = (i == 0 || i == 3); rx_d = 16'hA000;
      @(negedge clk); ce = 0;
    end
    @(negedge clk);
    check(n_sync == 1, "early header flagged");
    // finish that event, then a link test pattern: 40 words counting up,
    // one word out of sequence (pattern error and framing error), 20 more
    for (int i = 0; i < 34; i++) begin
      @(negedge clk); ce = 1; rx_valid = 1; rx_flag = 0; rx_d = 16'h0;
      @(negedge clk); ce = 0;
    end
    n_sync = 0;
    for (int i = 0; i < 61; i++) begin
      @(negedge clk); ce = 1; rx_valid = 1; rx_flag = 0;
      rx_d = (i == 40) ? 16'h1234 : 16'(16'hFFF0 + i);
      @(negedge clk); ce = 0;
    end
    @(negedge clk);
    // first word: no predecessor; word 40 and the one after it break the run
    check(n_tok == 58 && n_terr == 2 && n_sync == 3,
          $sformatf("pattern: %0d in sequence, %0d out, %0d framing", n_tok, n_terr, n_sync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
