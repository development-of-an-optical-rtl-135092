// End-to-end test of rich_readout_top at its default sizes: two HPDs, their
// PInts, four link models, the Level-1 controller and the QDR model (9 Mbit,
// 128K bursts). Every part of the chain is exercised and counted:
//  1. 24 events travel from the pixel rows to the DAQ output. Level-1
//     decisions are broadcast while later events are still being written,
//     so reads use the K edges the writes leave free; rejected events are
//     skipped. Every accepted event's 36 bursts are compared with the
//     reference built in tb_rich_pkg. One fibre word is corrupted on the
//     way (parity and CRC check bits must be set) and one decision carries
//     a wrong event ID.
//  2. Buffer overflow: 3660 more events are sent with no decision. The QDR
//     holds 3640 (131072 addresses / 36); the rest must be dropped and
//     counted, and the write pointer must never pass unread data.
//     Then every one of the 3660 gets its decision: only the last stored
//     event is accepted among the stored ones, and the accepts sent for
//     the dropped events must produce no output. Four new events, all
//     accepted, must then come out intact, which shows that the decisions
//     for dropped events were discarded and the rest stayed matched.
//  3. Link test mode is switched on over JTAG: both PInts send the test
//     pattern, which the Level-1 side checks word by word (up on one fibre
//     of a pair, down on the other).
// A mechanism that never happened counts as a failure.
module tb_rich_readout_top;
  import rich_pkg::*;
  import tb_rich_pkg::*;
  logic clk40 = 0, clk160 = 0, rst40_n = 0, rst160_n = 0;
  logic bcr = 0, l0 = 0;
  logic [1:0] pix_valid = '0;
  logic [1:0][31:0] pix_row = '0;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic [1:0] pshift, pupd, psdi, psdo;
  logic [3:0][15:0] gol_d, rx_d;
  logic [3:0] gol_en, gol_flag, rx_valid, rx_flag, rx_err;
  logic [3:0][15:0] flip;
  logic brcst_str = 0;
  logic [7:0] brcst = '0;
  logic qdr_k, wps_n, rps_n;
  logic [16:0] sa;
  qdr_word_t qd, qq;
  logic daq_valid, daq_sof, daq_eof;
  qdr_burst_t daq_burst;
  l1_status_t st;
  logic [15:0] stored;
  int perr, nw, nr;
  int checks = 0, failures = 0;

  rich_readout_top dut (
    .clk40, .rst40_n, .ttc0_bcr(bcr), .ttc0_l0_accept(l0), .ttc0_sinerr(1'b0), .ttc0_dberr(1'b0),
    .pix_valid, .pix_row, .tck, .trst_n, .tms, .tdi, .tdo,
    .pix_shift(pshift), .pix_update(pupd), .pix_sdi(psdi), .pix_sdo(psdo),
    .gol_ready(4'hF), .gol_d, .gol_en, .gol_flag,
    .clk160, .rst160_n, .rx_valid, .rx_flag, .rx_err, .rx_d,
    .ttc1_l0_accept(l0_q), .ttc1_brcst_str(brcst_str_q), .ttc1_brcst(brcst_q),
    .qdr_k, .qdr_wps_n(wps_n), .qdr_rps_n(rps_n), .qdr_sa(sa), .qdr_d(qd), .qdr_q(qq),
    .daq_valid, .daq_sof, .daq_eof, .daq_burst, .l1_status(st), .l1_events_stored(stored));

  for (genvar h = 0; h < 2; h++) begin : g_pix
    logic [351:0] dac;
    pixel_dac_chain_model u_pix (.tck, .shift(pshift[h]), .update(pupd[h]), .sdi(psdi[h]),
      .sdo(psdo[h]), .dac);
  end
  for (genvar f = 0; f < 4; f++) begin : g_link
    link_model u_link (.clk40, .gol_d(gol_d[f]), .gol_en(gol_en[f]), .gol_flag(gol_flag[f]),
      .flip_mask(flip[f]), .rx_d(rx_d[f]), .rx_valid(rx_valid[f]), .rx_flag(rx_flag[f]),
      .rx_err(rx_err[f]));
  end
  qdr_sram_model u_qdr (.clk(clk160), .k(qdr_k), .wps_n, .rps_n, .sa, .d(qd), .q(qq),
    .protocol_errors(perr), .writes(nw), .reads(nr));

  // the counting room's TTCrx outputs change with the rising 40 MHz edge
  logic l0_q = 0, brcst_str_q = 0;
  logic [7:0] brcst_q = '0;
  always @(posedge clk40) begin
    l0_q        <= l0;
    brcst_str_q <= brcst_str;
    brcst_q     <= brcst;
  end

  // 160 MHz and 40 MHz from one source, rising edges aligned
  always #3.125ns clk160 = ~clk160;
  always #12.5ns  clk40  = ~clk40;
  always #50ns    tck    = ~tck;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- JTAG (chain of two PInts)
  task automatic step(input logic m, input logic d);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask
  logic [31:0] dout;
  task automatic scan(input bit ir, input int n, input logic [31:0] din);
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
  endtask

  // ---------------------------------------------------------------- mechanisms
  int m_events_out = 0, m_rejects = 0, m_interleave = 0, m_dropped = 0, m_pattern = 0;
  int m_check_bits = 0, m_evid = 0;
  // a read address on the rising K edge right after a write address shows
  // reads using the edges the writes leave free
  int k_rise = 0, last_w = -10, last_r = -10;
  always @(posedge clk160) if (rst160_n && !qdr_k) begin
    k_rise++;
    if (!wps_n) last_w = k_rise;
    if (!rps_n) begin
      last_r = k_rise;
      if (last_w == k_rise - 1) m_interleave++;
    end
  end

  // DAQ monitor
  qdr_burst_t expq[$];
  int n_b = 0;
  always @(posedge clk160) if (rst160_n && daq_valid) begin
    if (expq.size() == 0) check(0, "unexpected DAQ burst");
    else begin
      check(daq_burst == expq[0], $sformatf("DAQ burst %0d: got %h want %h", n_b, daq_burst, expq[0]));
      check(daq_sof == (n_b % 36 == 0) && daq_eof == (n_b % 36 == 35), "event boundaries");
      if (daq_eof) m_events_out++;
      for (int f = 0; f < 4; f++) if (n_b % 36 > 0 && daq_burst[f][16]) m_check_bits++;
      void'(expq.pop_front());
    end
    n_b++;
  end

  int bx = 0;   // the PInt's bunch count, counted here
  always @(posedge clk40) if (rst40_n) bx <= (bx == 3562) ? 0 : bx + 1;

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_dec = 0;
  task automatic decision(input bit acc, input bit bad_id);
    brcst_str = 1;
    brcst = {2'(n_dec) ^ (bad_id ? 2'b01 : 2'b00), 1'b1, acc, 4'b0};
    n_dec++;
    if (!acc) m_rejects++;
  endtask

  // one event: Level-0 accept, 32 rows per HPD, 3 idle crossings (36 crossings, 1.1 MHz)
  task automatic send_event(input int e, input bit expect_out, input bit corrupt);
    rows_t rows [2];
    ev_t ev [2];
    qdr_burst_t b;
    l0 = 1;
    for (int h = 0; h < 2; h++) begin
      for (int r = 0; r < 32; r++) rows[h][r] = $urandom;
      ev[h] = ref_event(12'(bx), 32'h0, rows[h]);
    end
    if (expect_out) for (int i = 0; i < 36; i++) begin
      for (int f = 0; f < 4; f++) begin
        logic [15:0] w;
        logic c;
        w = ev[f / 2][i][16 * (f % 2) +: 16];
        c = (i == 0) || (corrupt && f == 1 && (i == 34 || i == 35));
        if (i == 4 || i == 5) c = e[i - 4];        // event ID LSBs
        if (corrupt && f == 1 && i == 9) w = w ^ 16'h0100;
        b[f] = {1'b0, c, w};
      end
      expq.push_back(b);
    end
    @(negedge clk40);
    l0 = 0;
    for (int r = 0; r < 32; r++) begin
      pix_valid = 2'b11;
      pix_row[0] = rows[0][r];
      pix_row[1] = rows[1][r];
      @(negedge clk40);
      brcst_str = 0;
    end
    pix_valid = '0;
    repeat (3) @(negedge clk40);
  endtask

  bit acc [24];
  initial begin
    repeat (4) @(posedge clk40);
    @(negedge clk40) begin rst40_n = 1; trst_n = 1; end
    // Level-1 reset released so that phase 0 starts with a crossing
    @(posedge clk40); @(negedge clk160) rst160_n = 1;
    @(negedge clk40);

    // ---- 1. events end to end
    for (int e = 0; e < 24; e++) acc[e] = (e % 4 != 2);
    fork
      for (int e = 0; e < 24; e++) send_event(e, acc[e], e == 5);
      begin
        // decisions two events behind, so reads overlap writes
        repeat (3 * 36) @(negedge clk40);
        for (int d = 0; d < 24; d++) begin
          repeat (36) @(negedge clk40);
          decision(acc[d], d == 9);
          @(negedge clk40) brcst_str = 0;
        end
      end
    join
    wait (n_dec == 24);
    while (expq.size() != 0) @(negedge clk40);
    repeat (50) @(negedge clk40);
    check(st.evid_err == 1, $sformatf("event ID errors %0d", st.evid_err));
    m_evid = st.evid_err;
    check(st.bxid_err == 0 && st.sync_err == 0 && st.lost == 0, "clean links otherwise");
    check(stored == 0, "everything read or skipped");

    // ---- 2. overflow
    for (int e = 0; e < 3660; e++) send_event(24 + e, e == 3639, 0);
    repeat (100) @(negedge clk40);
    m_dropped = st.dropped;
    check(stored == 3640, $sformatf("%0d events stored, 3640 expected", stored));
    check(st.dropped == 20, $sformatf("%0d events dropped, 20 expected", st.dropped));

    // ---- 2b. decisions for all 3660: the stored ones are rejected except
    // the last; the dropped ones are accepted and must produce nothing
    for (int d = 0; d < 3660; d++) begin
      decision(d >= 3639, 1'b0);
      @(negedge clk40) brcst_str = 0;
      repeat (3) @(negedge clk40);
    end
    // ---- 2c. new events after the drops, all accepted: they must come out
    // intact, so the dropped events' decisions were matched to them
    for (int e = 0; e < 4; e++) send_event(24 + 3660 + e, 1, 0);
    for (int d = 0; d < 4; d++) begin
      decision(1'b1, 1'b0);
      @(negedge clk40) brcst_str = 0;
      repeat (3) @(negedge clk40);
    end
    while (expq.size() != 0) @(negedge clk40);
    repeat (100) @(negedge clk40);
    check(stored == 0, $sformatf("%0d events left after the drain", stored));
    check(st.dropped == 20 && st.evid_err == 1 && st.lost == 0, "no further drops or event ID errors");

    // ---- 3. link test mode over the JTAG chain (instruction CONFIG in both PInts)
    step(0, 0);
    scan(1, 8, 32'h22);
    // the first bits shifted in travel to PInt 1: PInt 1 gets 8'h01 (test
    // mode) and PInt 0 gets 8'h03 (test mode, status held clear)
    scan(0, 16, 32'h0301);
    scan(0, 16, 32'h0301);
    check(dout[15:0] == 16'h0301, $sformatf("configuration read back over the chain: %h", dout[15:0]));
    repeat (40) @(negedge clk40);
    m_pattern = st.test_ok;
    check(st.test_ok > 30 && st.test_err == 0,
          $sformatf("pattern words checked at Level-1: %0d in sequence, %0d out", st.test_ok, st.test_err));
    check(st.sync_err == 4, $sformatf("one framing error per fibre as the pattern starts: %0d", st.sync_err));

    check(perr == 0, "QDR protocol");
    check(st.parity_err == 1 && st.crc_err == 1, "corrupted word caught by parity and CRC");
    $display("mechanisms: events out %0d, rejects %0d, read/write interleaves %0d, dropped %0d,",
             m_events_out, m_rejects, m_interleave, m_dropped);
    $display("            check bits %0d, event ID errors %0d, test pattern words %0d",
             m_check_bits, m_evid, m_pattern);
    check(m_events_out == 18 + 1 + 4, "accepted events delivered");
    check(m_rejects == 6 + 3639, "rejected events skipped");
    check(m_interleave > 0, "reads interleaved with writes");
    check(m_dropped > 0, "overflow");
    check(m_check_bits > 0, "check bits stamped");
    check(m_evid > 0, "event ID check");
    check(m_pattern > 0, "link test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the bit error of event 5 on fibre 1, word 9, applied where the word enters the link
  int gev = -1, gidx = 0;
  always @(posedge clk40) if (rst40_n && gol_en[1]) begin
    if (gol_flag[1]) begin gev <= gev + 1; gidx <= 1; end
    else gidx <= gidx + 1;
  end
  always_comb begin
    flip = '0;
    if (gol_en[1] && !gol_flag[1] && gev == 5 && gidx == 9) flip[1] = 16'h0100;
  end
endmodule
