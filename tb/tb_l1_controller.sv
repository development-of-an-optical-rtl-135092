// Self-checking test of l1_controller with the QDR model. The testbench
// plays two HPDs' worth of fibres: each event is built by the reference in
// tb_rich_pkg and its 16-bit halves are sent on fibres 0/1 (HPD 0) and 2/3
// (HPD 1), one word per bunch crossing, events back to back (continuous
// writes). The Level-0 accept of each event's crossing goes to the TTC
// input; Level-1 decisions (random accept/reject, correct event ID bits)
// are broadcast while events are still arriving, so reads compete with
// writes. One event carries a wrong BX ID, one a corrupted data word and
// one decision a wrong event ID. Checked: every accepted event comes out as
// 36 bursts in order with the expected 18-bit words (data, check bit,
// receiver error bit), rejected events never come out, the error counters,
// no lost bursts at one burst per crossing, and the QDR protocol.
module tb_l1_controller;
  import rich_pkg::*;
  import tb_rich_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] rx_valid = '0, rx_flag = '0, rx_err = '0;
  logic [3:0][15:0] rx_d = '0;
  logic l0_accept = 0, brcst_str = 0;
  logic [7:0] brcst = '0;
  logic qdr_k, wps_n, rps_n;
  logic [16:0] sa;
  qdr_word_t qd, qq;
  logic out_valid, out_sof, out_eof;
  qdr_burst_t out_burst;
  l1_status_t status;
  logic [15:0] stored;
  int perr, nw, nr;
  int checks = 0, failures = 0;

  l1_controller dut (.clk160(clk), .rst_n, .rx_valid, .rx_flag, .rx_err, .rx_d, .l0_accept,
    .brcst_str, .brcst, .qdr_k, .qdr_wps_n(wps_n), .qdr_rps_n(rps_n), .qdr_sa(sa), .qdr_d(qd),
    .qdr_q(qq), .out_valid, .out_sof, .out_eof, .out_burst, .status, .events_stored(stored));
  qdr_sram_model u_qdr (.clk, .k(qdr_k), .wps_n, .rps_n, .sa, .d(qd), .q(qq),
    .protocol_errors(perr), .writes(nw), .reads(nr));
  always #3 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NEV = 40;
  qdr_burst_t expq[$];
  int n_out = 0, n_sof = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (expq.size() == 0) check(0, "unexpected burst");
    else begin
      check(out_burst == expq[0], $sformatf("burst %0d: got %h want %h", n_out, out_burst, expq[0]));
      check(out_sof == (n_out % 36 == 0) && out_eof == (n_out % 36 == 35), "sof/eof");
      void'(expq.pop_front());
    end
    n_out++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bunch crossing bookkeeping: phase 0 starts a crossing
  int bx = 0;
  logic [1:0] tph = '0;   // the controller's crossing phase, counted here from reset
  always @(posedge clk) begin
    if (!rst_n) tph <= '0;
    else tph <= tph + 1'b1;
    if (rst_n && tph == 2'd1) bx <= (bx == 3562) ? 0 : bx + 1;
  end
  task automatic next_crossing();
    do @(negedge clk); while (tph != 2'd0);
  endtask

  ev_t ev [NEV][2];
  logic [11:0] evbx [NEV];
  bit acc [NEV];
  int dec_sent = 0;

  initial begin
    rows_t rows;
    qdr_burst_t b;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int e = 0; e < NEV; e++) acc[e] = (e % 3 != 1);
    for (int e = 0; e < NEV; e++) begin
      // Level-0 accept of this event's crossing, some crossings before it arrives
      next_crossing();
      evbx[e] = 12'(bx);
      l0_accept = 1;
      next_crossing();
      l0_accept = 0;
      for (int h = 0; h < 2; h++) begin
        for (int r = 0; r < 32; r++) rows[r] = $urandom;
        ev[e][h] = ref_event(e == 7 ? evbx[e] ^ 12'h001 : evbx[e], 32'(e), rows);
        if (e == 11 && h == 1) ev[e][h][5][16] = ~ev[e][h][5][16];   // damaged on fibre 3
      end
      if (acc[e]) for (int i = 0; i < 36; i++) begin
        for (int f = 0; f < 4; f++) begin
          logic c;
          c = (i == 0);
          if (e == 7 && i == 2) c = 1;                       // BX ID check bit
          if (i == 4 || i == 5) c = e[i - 4];                // event ID LSBs
          if (e == 11 && f == 3 && (i == 34 || i == 35)) c = 1;  // parity and CRC
          b[f] = {1'b0, c, ev[e][f / 2][i][16 * (f % 2) +: 16]};
        end
        expq.push_back(b);
      end
      // send the 36 words, one per crossing; a decision is broadcast midway
      for (int i = 0; i < 36; i++) begin
        for (int f = 0; f < 4; f++) rx_d[f] = ev[e][f / 2][i][16 * (f % 2) +: 16];
        rx_valid = '1;
        rx_flag  = (i == 0) ? 4'hF : 4'h0;
        if (i == 20 && e >= 2) begin
          brcst_str = 1;
          brcst = {2'(dec_sent) ^ (dec_sent == 5 ? 2'b10 : 2'b00), 1'b1, acc[dec_sent], 4'b0};
          dec_sent++;
        end
        next_crossing();
        brcst_str = 0;
      end
      rx_valid = '0; rx_flag = '0;
    end
    while (dec_sent < NEV) begin
      brcst_str = 1;
      brcst = {2'(dec_sent), 1'b1, acc[dec_sent], 4'b0};
      dec_sent++;
      next_crossing();
      brcst_str = 0;
      next_crossing();
    end
    repeat (3000) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d bursts never came out", expq.size()));
    check(status.bxid_err == 4, $sformatf("BX ID errors %0d", status.bxid_err));
    check(status.parity_err == 1 && status.crc_err == 1, "parity and CRC errors");
    check(status.evid_err == 1, "event ID error");
    check(status.lost == 0 && status.dropped == 0 && status.sync_err == 0, "nothing lost");
    check(stored == 0, "buffer empty at the end");
    check(perr == 0, "QDR protocol");
    $display("events %0d, bursts out %0d, QDR writes %0d reads %0d", NEV, n_out, nw, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
