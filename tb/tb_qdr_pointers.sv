// Self-checking test of qdr_pointers with a small address space (AW = 9,
// 512 bursts, so the buffer fills and wraps quickly) and 36 bursts per
// event. Events arrive at random (one burst per clock while an event is
// written) in bursts of activity, so the buffer fills, events are dropped,
// and writing resumes. Every event, kept or dropped, gets a random
// accept/reject decision in arrival order, some time after it arrived;
// reads are issued at random whenever rd_req is high. A reference model
// keeps the list of undecided events and checks:
//   - the write address and the number of stored events;
//   - room: a kept event fits without reaching unread data (wrap-around
//     included), and an event is refused while it would fit only during
//     a drop run (hysteresis);
//   - every read: only for an accepted, completely written, kept event,
//     at address offset + sub with first/last marked;
//   - every decision pop: a dropped event's decision is released without
//     a read and without moving the read pointer, a reject skips its event,
//     an accept pops after its 36th burst;
//   - at the end, after a drain with no new events, that every decision
//     was used and the buffer is empty.
module tb_qdr_pointers;
  localparam int AW = 9, EV = 36, DEPTH = 1 << AW;
  logic clk = 0, rst_n = 0;
  logic wr_take = 0, ev_written = 0, ev_start = 0, room;
  logic [AW-1:0] wr_addr, rd_addr;
  logic dec_valid, dec_accept, dec_pop, rd_req, rd_issue = 0, rd_first, rd_last;
  logic [15:0] stored;
  int checks = 0, failures = 0;

  qdr_pointers #(.AW(AW), .EV_WORDS(EV)) dut (.clk, .rst_n, .wr_take, .ev_written, .ev_start,
    .wr_addr, .room, .dec_valid, .dec_accept, .dec_pop, .rd_req, .rd_addr, .rd_issue,
    .rd_first, .rd_last, .stored);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state: undecided events in arrival order
  bit  m_kept [$];
  int  m_start [$];      // first address of each kept event (kept events only)
  bit  decq [$];         // decisions waiting, the head belongs to m_kept[0]
  int  m_wr = 0, m_written = 0, m_kept_done = 0, m_sub = 0;
  int  n_drop = 0, n_resume = 0, n_reads = 0, n_skips = 0, n_drop_dec = 0, n_wraps = 0, evw = 0;
  bit  writing = 0, last_dropped = 0, arrivals = 1;

  initial begin dec_valid = 0; dec_accept = 0; end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 160000; c++) begin
      @(negedge clk);
      arrivals = (c < 140000);
      check(wr_addr == AW'(m_wr), "write address");
      check(stored == 16'(m_written - m_kept_done), "stored events");
      wr_take = 0; ev_written = 0; ev_start = 0;
      // new events come in bursts of activity (every other 4000 clocks)
      if (arrivals && !writing && $urandom_range(0, 15) == 0 && (c / 4000) % 2 == 0) begin
        int used, free_ok;
        ev_start = 1;
        used = m_start.size() ? m_wr - m_start[0] : 0;
        free_ok = (used + EV <= DEPTH - 1);
        #1;
        if (room) begin
          check(free_ok, "room only when a whole event fits");
          if (last_dropped) n_resume++;
          writing = 1; evw = 0; m_start.push_back(m_wr); m_kept.push_back(1);
          last_dropped = 0;
        end else begin
          check(!free_ok || last_dropped, "an event that fits is refused only inside a drop run");
          n_drop++; m_kept.push_back(0); last_dropped = 1;
        end
      end
      if (writing) begin
        wr_take = 1;
        evw++;
        if (evw == EV) begin ev_written = 1; writing = 0; end
      end
      // a decision for the oldest event without one, now and then
      if ($urandom_range(0, 59) == 0 && decq.size() < m_kept.size() && decq.size() < 16)
        decq.push_back($urandom_range(0, 1));
      if (!arrivals && decq.size() < m_kept.size() && decq.size() < 16)
        decq.push_back($urandom_range(0, 1));
      dec_valid  = decq.size() > 0;
      dec_accept = dec_valid ? decq[0] : 1'b0;
      // read side
      #1;
      rd_issue = rd_req && $urandom_range(0, 1);
      #1;
      if (rd_req) begin
        check(decq.size() > 0 && decq[0] && m_kept[0] && m_written > m_kept_done,
              "read only for an accepted, completely written, kept event");
        check(rd_addr == AW'(m_start[0] + m_sub), "read address = offset + sub");
        check(rd_first == (m_sub == 0) && rd_last == (m_sub == EV - 1), "first/last");
      end
      if (dec_pop) begin
        check(decq.size() > 0, "pop with a decision waiting");
        if (!m_kept[0]) check(!rd_issue, "dropped event: no read");
        else if (!decq[0]) check(m_written > m_kept_done, "reject only on a written event");
        else check(rd_issue && m_sub == EV - 1, "accept released after its last burst");
      end
      @(posedge clk);
      if (wr_take) begin m_wr++; if (m_wr % DEPTH == 0) n_wraps++; end
      if (rd_issue) n_reads++;
      if (dec_pop) begin
        if (!m_kept[0]) n_drop_dec++;
        else begin
          if (!decq[0]) n_skips++;
          void'(m_start.pop_front()); m_kept_done++; m_sub = 0;
        end
        void'(decq.pop_front()); void'(m_kept.pop_front());
      end else if (rd_issue) m_sub++;
      if (ev_written) m_written++;
    end
    check(m_kept.size() == 0 && decq.size() == 0, $sformatf("%0d events never decided", m_kept.size()));
    check(stored == 0, "buffer empty after the drain");
    check(n_drop > 0 && n_resume > 0 && n_reads > 0 && n_skips > 0 && n_drop_dec == n_drop && n_wraps > 0,
          $sformatf("drops %0d resumes %0d reads %0d skips %0d dropped decisions %0d wraps %0d",
                    n_drop, n_resume, n_reads, n_skips, n_drop_dec, n_wraps));
    $display("drops %0d resumes %0d reads %0d skips %0d dropped decisions %0d wraps %0d",
             n_drop, n_resume, n_reads, n_skips, n_drop_dec, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
