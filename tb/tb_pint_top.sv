// Self-checking test of the PInt chip (pint_top) with the pixel DAC chain
// model. Level-0 accepts are sent at known crossings and the pixel chip's
// 32 rows follow; both GOL outputs are collected and each event is compared
// with the reference (header with the bunch ID counted here, error word,
// rows, parity, per-fibre CRC) split into the fibre A (low) and fibre B
// (high) halves. Also checked: the header leaves 3 clocks after the last
// row, an event takes 36 consecutive crossings, a TTC single-bit error is
// reported in the next error word and in the JTAG status word, link test
// mode switched on over JTAG puts the test pattern on both GOLs, and the
// 44 pixel DACs load over JTAG.
module tb_pint_top;
  import tb_rich_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bcr = 0, l0 = 0, sinerr = 0, dberr = 0;
  logic pix_valid = 0;
  logic [31:0] pix_row = '0;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic pshift, pupd, psdi, psdo;
  logic [351:0] dac;
  logic [1:0] gol_ready = 2'b11;
  logic [15:0] ad, bd;
  logic aen, afl, ben, bfl;
  logic [11:0] bxid;
  int checks = 0, failures = 0;

  pint_top dut (.clk40(clk), .rst_n, .ttc_bcr(bcr), .ttc_l0_accept(l0), .ttc_sinerr(sinerr),
    .ttc_dberr(dberr), .pix_valid, .pix_row, .tck, .trst_n, .tms, .tdi, .tdo,
    .pix_shift(pshift), .pix_update(pupd), .pix_sdi(psdi), .pix_sdo(psdo), .gol_ready,
    .gol_a_d(ad), .gol_a_en(aen), .gol_a_flag(afl), .gol_b_d(bd), .gol_b_en(ben), .gol_b_flag(bfl),
    .bxid);
  pixel_dac_chain_model u_pix (.tck, .shift(pshift), .update(pupd), .sdi(psdi), .sdo(psdo), .dac);

  always #12.5 clk = ~clk;
  always #50 tck = ~tck;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- JTAG
  task automatic step(input logic m, input logic d);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask
  task automatic scan(input bit ir, input int n, input logic [351:0] din, output logic [351:0] dout);
    dout = '0;
    step(1, 0);
    if (ir) step(1, 0);
    step(0, 0);
    step(0, 0);
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
    step(1, 0);
    step(0, 0);
    #1;
  endtask

  // ---------------------------------------------------------------- GOL monitor
  int cyc = 0, bx = 0, widx = -1, n_ev = 0, last_row_cyc = 0, hdr_lat = -1;
  ev_t expq[$], cur;
  bit test_mode_chk = 0;
  int n_pattern = 0;
  logic [15:0] pat;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    bx <= (bx == 3562) ? 0 : bx + 1;
    if (test_mode_chk) begin
      if (aen && ben) begin
        if (n_pattern == 0) pat = ad;
        check(ad == pat && bd == ~pat && !afl, "link test pattern");
        pat = pat + 1'b1;
        n_pattern++;
      end
    end else if (aen || ben) begin
      check(aen && ben, "both GOLs carry the event");
      if (afl) begin
        check(widx == -1 && bfl, "header flagged on both fibres");
        if (expq.size() == 0) begin check(0, "unexpected event"); cur = '0; end
        else cur = expq.pop_front();
        widx = 0;
        if (hdr_lat < 0) hdr_lat = cyc - last_row_cyc;
      end
      if (widx >= 0) begin
        check(ad == cur[widx][15:0] && bd == cur[widx][31:16],
              $sformatf("word %0d: got %h%h want %h", widx, bd, ad, cur[widx]));
        if (widx == 35) begin widx = -1; n_ev++; end else widx++;
      end
    end else check(widx == -1, "gap inside an event");
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rows_t rows;
  logic [351:0] o, dacpat;
  logic [31:0] err;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) begin rst_n = 1; trst_n = 1; end
    for (int e = 0; e < 12; e++) begin
      err = '0;
      if (e == 4) begin
        // a TTC single-bit error while idle shows in the next event's error word
        @(negedge clk) sinerr = 1;
        @(negedge clk) sinerr = 0;
        err[2] = 1;
      end
      @(negedge clk);
      l0 = 1;
      for (int r = 0; r < 32; r++) rows[r] = $urandom;
      expq.push_back(ref_event(12'(bx), err, rows));
      @(negedge clk) l0 = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      for (int r = 0; r < 32; r++) begin
        pix_valid = 1; pix_row = rows[r];
        @(negedge clk);
        last_row_cyc = cyc;
      end
      pix_valid = 0;
      // let events queue up sometimes, wait for them otherwise
      if (e % 2 == 1) while (expq.size() != 0 || widx != -1) @(negedge clk);
      // the monitor sees the pins one edge after they change: 3 clocks + 1
      if (e == 1) check(hdr_lat == 4, $sformatf("header latency %0d clocks", hdr_lat - 1));
    end
    while (expq.size() != 0 || widx != -1) @(negedge clk);
    check(n_ev == 12, $sformatf("%0d events", n_ev));
    // status over JTAG: the single-bit TTC error is bit 2
    step(0, 0);
    scan(1, 4, 352'h4, o);
    scan(0, 32, '0, o);
    check(o[2] == 1'b1, $sformatf("status word %h", o[31:0]));
    // pixel DACs
    for (int i = 0; i < 11; i++) dacpat[i*32 +: 32] = $urandom;
    scan(1, 4, 352'h3, o);
    scan(0, 352, dacpat, o);
    check(dac == dacpat, "pixel DACs loaded through the PInt");
    // link test mode
    scan(1, 4, 352'h2, o);
    test_mode_chk = 1;
    scan(0, 8, 352'h01, o);
    repeat (100) @(negedge clk);
    check(n_pattern > 90, $sformatf("test pattern words %0d", n_pattern));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
