// QDR address counters of the Level-1 buffer.
//
// Write side: a wrap-around counter gives the write address and advances by
// one for every burst written (one burst = one word of each of the four
// fibres, so an event takes EV_WORDS consecutive addresses).
// Read side: the address is offset + sub. The offset counter moves on by
// EV_WORDS on every Level-1 decision for a stored event, so the read
// pointer always starts at the beginning of an event; on an accept the read
// machine reads EV_WORDS bursts, advancing the sub counter, which returns to
// zero after the event. A reject moves the offset without reading.
// Protection: the read side only starts on an event that has been written
// completely (events written > events released), and a new event is kept
// (room) only if all of it fits without reaching the oldest unread event,
// so neither pointer can overtake the other.
// Full buffer: an event that arrives (ev_start) without room is dropped
// whole. Once dropping has started, events are kept again only when the
// buffer is at most half full, so drops come in a few long runs. Each run
// is recorded as (events kept before it, its length) in a RUNS-deep FIFO;
// when the decisions reach a run, that many decisions are discarded
// without moving the offset, so later decisions still meet their events.
// Writing resumes only while a FIFO entry is free, so the record is never
// lost.
// Counters and decision handling follow the document; the event counters,
// the room rule, the drop runs and the release of rejected events are this
// design's.
//
// Interface: dec_* is the head of the Level-1 decision buffer (pop on
// dec_pop). Timing: a reject, or a decision for a dropped event, is
// released in one clock.
module qdr_pointers
  import rich_pkg::*;
#(
  parameter int unsigned AW       = 17,   // QDR address bits (128K bursts)
  parameter int unsigned EV_WORDS = 36,  // bursts per event
  parameter int unsigned RUNS     = 4     // drop runs that can be pending
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side
  input  logic          wr_take,      // a burst address was used
  input  logic          ev_written,   // the last burst of an event was taken
  input  logic          ev_start,     // an event arrives; kept if room, else dropped
  output logic [AW-1:0] wr_addr,
  output logic          room,         // a further complete event fits
  // Level-1 decisions
  input  logic          dec_valid,
  input  logic          dec_accept,
  output logic          dec_pop,
  // read side
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_issue,
  output logic          rd_first,     // the burst being issued is an event's first
  output logic          rd_last,      // ... or last
  output logic [15:0]   stored        // complete events waiting
);
  localparam int unsigned RW = (RUNS > 1) ? $clog2(RUNS) : 1;

  logic [AW-1:0] offset;
  logic [5:0]    sub;
  logic [15:0]   written, released;
  logic [AW-1:0] used;
  logic          avail, skip, fits, dropping;

  // drop runs
  logic [15:0]   run_kept [RUNS];
  logic [15:0]   run_len  [RUNS];
  logic [RW-1:0] run_rd, run_wr, run_tail;
  logic [RW:0]   run_cnt;
  logic [15:0]   kept_cnt, dec_cnt, run_used;
  logic          ev_drop, ev_keep, run_push, at_run, dec_drop, run_done, dec_kept;

  assign used     = wr_addr - offset;
  assign fits     = used <= AW'((1 << AW) - EV_WORDS - 1);
  assign room     = fits && !dropping;
  assign stored   = written - released;
  assign avail    = (stored != '0);

  assign ev_drop  = ev_start && !room;
  assign ev_keep  = ev_start && room;
  assign run_push = ev_drop && !dropping;
  assign run_tail = run_wr - 1'b1;
  // the head decision belongs to the oldest run of dropped events
  assign at_run   = (run_cnt != '0) && (dec_cnt == run_kept[run_rd]);
  assign dec_drop = at_run && dec_valid && (run_used != run_len[run_rd]);
  assign run_done = at_run && (run_used == run_len[run_rd]) && !(run_cnt == 1 && dropping);

  assign rd_req   = avail && dec_valid && dec_accept && !at_run;
  assign rd_addr  = offset + AW'(sub);
  assign rd_first = (sub == '0);
  assign rd_last  = (sub == 6'(EV_WORDS - 1));
  assign skip     = avail && dec_valid && !dec_accept && !at_run;
  assign dec_kept = skip || (rd_issue && rd_last);
  assign dec_pop  = dec_kept || dec_drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr  <= '0;
      offset   <= '0;
      sub      <= '0;
      written  <= '0;
      released <= '0;
    end else begin
      if (wr_take)    wr_addr <= wr_addr + 1'b1;
      if (ev_written) written <= written + 1'b1;
      if (dec_kept) begin
        offset   <= offset + AW'(EV_WORDS);
        sub      <= '0;
        released <= released + 1'b1;
      end else if (rd_issue) begin
        sub <= sub + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dropping <= 1'b0;
      run_rd   <= '0;
      run_wr   <= '0;
      run_cnt  <= '0;
      kept_cnt <= '0;
      dec_cnt  <= '0;
      run_used <= '0;
      for (int i = 0; i < RUNS; i++) begin
        run_kept[i] <= '0;
        run_len[i]  <= '0;
      end
    end else begin
      // write side: open a run on the first drop, lengthen it on the next
      if (ev_drop) dropping <= 1'b1;
      else if (dropping && used <= AW'(1 << (AW - 1)) && run_cnt < (RW+1)'(RUNS))
        dropping <= 1'b0;
      if (ev_keep) kept_cnt <= kept_cnt + 1'b1;
      if (run_push) begin
        run_kept[run_wr] <= kept_cnt;
        run_len[run_wr]  <= 16'd1;
        run_wr           <= (run_wr == RW'(RUNS - 1)) ? '0 : run_wr + 1'b1;
        kept_cnt         <= '0;
      end else if (ev_drop) begin
        run_len[run_tail] <= run_len[run_tail] + 1'b1;
      end
      // decision side
      if (dec_kept) dec_cnt <= dec_cnt + 1'b1;
      if (dec_drop) run_used <= run_used + 1'b1;
      if (run_done) begin
        run_rd   <= (run_rd == RW'(RUNS - 1)) ? '0 : run_rd + 1'b1;
        run_used <= '0;
        dec_cnt  <= '0;
      end
      run_cnt <= run_cnt + (RW+1)'(run_push) - (RW+1)'(run_done);
    end
  end

endmodule
