// Level-1 buffer controller (the QDR controller FPGA).
//
// Takes the four 16-bit fibre streams of two HPDs, checks them, and writes
// one word of each fibre per bunch crossing into a QDR SRAM as a 4-word
// burst of 18-bit words: 40 MHz addresses, 160 MHz data. Events wait there
// for the Level-1 trigger; accepted events are read back as bursts for the
// DAQ, rejected ones are skipped.
//
// Clocking: everything runs on one 160 MHz clock, from which the 80 MHz QDR
// K clock (qdr_k) and the 40 MHz bunch crossing phase are derived by a
// 2-bit phase counter; reset must be released in step with the bunch
// crossing clock so that phase 0 starts a crossing. The fibre words and the
// TTC signals, which change with the 40 MHz clock, are sampled in phase 1.
// The document derives the clocks with the FPGA's delay-locked loops; this
// single-clock arrangement is this design's.
//
// Data path: l1_rx_check per fibre (BX ID, parity and CRC checks; 36-bit
// check word, carrying also the two LSBs of a local event count, and the
// receiver error flag in the two spare bits) -> burst
// register -> qdr_write_fsm. An event is written only if qdr_pointers says
// a whole event fits; otherwise it is dropped and counted. Read path:
// Level-1 decisions from l1_ttc -> qdr_pointers -> qdr_read_fsm, which uses
// the rising K edges left free by the write machine. The QDR address bus
// is shared: write addresses and read addresses go out on alternate rising
// K edges.
//
// Status: saturating 16-bit counters of check errors, drops, lost bursts,
// TTC overflows and link test pattern words in and out of sequence (the
// last two are this design's self test, counted over all four fibres).
//
// Output: out_valid pulses with a 4-word burst (word i from fibre i);
// out_sof marks an event's first burst and out_eof its 36th.
module l1_controller
  import rich_pkg::*;
(
  input  logic                  clk160,
  input  logic                  rst_n,
  // receivers, fibre i on index i
  input  logic [3:0]            rx_valid,
  input  logic [3:0]            rx_flag,
  input  logic [3:0]            rx_err,
  input  logic [3:0][15:0]      rx_d,
  // TTCrx
  input  logic                  l0_accept,
  input  logic                  brcst_str,
  input  logic [7:0]            brcst,
  // QDR SRAM
  output logic                  qdr_k,
  output logic                  qdr_wps_n,
  output logic                  qdr_rps_n,
  output logic [QDR_ADDR_W-1:0] qdr_sa,
  output qdr_word_t             qdr_d,
  input  qdr_word_t             qdr_q,
  // to the DAQ
  output logic                  out_valid,
  output logic                  out_sof,
  output logic                  out_eof,
  output qdr_burst_t            out_burst,
  // to the ECS
  output l1_status_t            status,
  output logic [15:0]           events_stored
);
  logic [1:0] ph;
  logic       k, ce;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= ph + 1'b1;
  end
  assign k     = ph[0];
  assign qdr_k = k;
  assign ce    = (ph == 2'd1);

  // ---------------------------------------------------------------- TTC
  logic [11:0] bxid, bx_head;
  logic        bx_empty, bx_pop, dec_valid, dec_accept, dec_pop;
  logic [1:0]  event_id;
  logic        err_evid, err_derand_ovf, err_dec_ovf;

  l1_ttc u_ttc (
    .clk(clk160), .rst_n, .ce, .l0_accept, .brcst_str, .brcst, .bxid,
    .bx_pop, .bx_head, .bx_empty, .dec_pop, .dec_valid, .dec_accept, .event_id,
    .err_evid, .err_derand_ovf, .err_dec_ovf
  );

  // ---------------------------------------------------------------- checks
  logic [3:0]       hdr_seen, ck_valid, e_bx, e_par, e_crc, e_sync, t_ok, t_err;
  qdr_word_t [3:0]  ck_word;
  logic [3:0][5:0]  ck_idx;

  for (genvar f = 0; f < 4; f++) begin : g_fibre
    l1_rx_check u_chk (
      .clk(clk160), .rst_n, .ce,
      .rx_valid(rx_valid[f]), .rx_flag(rx_flag[f]), .rx_err(rx_err[f]), .rx_d(rx_d[f]),
      .expected_bxid(bx_head), .event_id(l0_evid), .hdr_seen(hdr_seen[f]),
      .out_valid(ck_valid[f]), .out_word(ck_word[f]), .out_idx(ck_idx[f]),
      .err_bxid(e_bx[f]), .err_parity(e_par[f]), .err_crc(e_crc[f]), .err_sync(e_sync[f]),
      .test_ok(t_ok[f]), .test_err(t_err[f])
    );
  end
  assign bx_pop = hdr_seen[0] && !bx_empty;

  // local event ID of the arriving events: counts headers, cleared by the
  // event counter reset; its two LSBs are stored in each event's check word
  logic [1:0] l0_evid;
  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n)                                    l0_evid <= '0;
    else if (ce && brcst_str && brcst[BC_ECR])     l0_evid <= '0;
    else if (hdr_seen[0])                          l0_evid <= l0_evid + 1'b1;
  end

  // fibres must deliver the same word of the same event together
  logic misaligned;
  assign misaligned = (ck_valid != 4'b0000) &&
                      ((ck_valid != 4'b1111) || ck_idx[1] != ck_idx[0] ||
                       ck_idx[2] != ck_idx[0] || ck_idx[3] != ck_idx[0]);

  // ---------------------------------------------------------------- write
  logic                  take, get_data, hold_read, room, dropping;
  logic                  pend_last;
  qdr_burst_t            pend;
  logic [QDR_ADDR_W-1:0] wr_addr, rd_addr, w_sa, r_sa;
  logic                  lost_burst, drop_event;
  logic                  ev_written;

  assign drop_event = ck_valid[0] && ck_idx[0] == 6'd0 && !room;
  assign lost_burst = ck_valid[0] && !(dropping || drop_event) && get_data && !take;
  assign ev_written = take && pend_last;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) begin
      get_data  <= 1'b0;
      pend      <= '0;
      pend_last <= 1'b0;
      dropping  <= 1'b0;
    end else begin
      if (ck_valid[0] && ck_idx[0] == 6'd0) dropping <= !room;
      if (ck_valid[0] && !(dropping && ck_idx[0] != 6'd0) && !drop_event) begin
        get_data  <= 1'b1;
        pend      <= ck_word;
        pend_last <= (ck_idx[0] == 6'(WORDS_PER_EVENT - 1));
      end else if (take) begin
        get_data  <= 1'b0;
      end
    end
  end

  qdr_write_fsm u_wr (
    .clk(clk160), .rst_n, .k, .get_data, .data_in(pend), .take, .wr_addr,
    .wps_n(qdr_wps_n), .sa(w_sa), .d(qdr_d), .hold_read
  );

  // ---------------------------------------------------------------- read
  logic rd_req, rd_issue, rd_first, rd_last, rd_valid;
  qdr_burst_t rd_burst;
  logic [5:0] out_cnt;

  qdr_pointers #(.AW(QDR_ADDR_W), .EV_WORDS(WORDS_PER_EVENT)) u_ptr (
    .clk(clk160), .rst_n, .wr_take(take), .ev_written,
    .ev_start(ck_valid[0] && ck_idx[0] == 6'd0), .wr_addr, .room,
    .dec_valid, .dec_accept, .dec_pop,
    .rd_req, .rd_addr, .rd_issue, .rd_first, .rd_last, .stored(events_stored)
  );

  qdr_read_fsm u_rd (
    .clk(clk160), .rst_n, .k, .hold_read, .rd_req, .rd_addr, .issue(rd_issue),
    .rps_n(qdr_rps_n), .sa(r_sa), .q(qdr_q), .rd_valid, .rd_burst
  );

  // one shared address bus: write address has priority on its edge
  assign qdr_sa = hold_read ? w_sa : r_sa;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) out_cnt <= '0;
    else if (rd_valid) out_cnt <= (out_cnt == 6'(WORDS_PER_EVENT - 1)) ? '0 : out_cnt + 1'b1;
  end
  assign out_valid = rd_valid;
  assign out_burst = rd_burst;
  assign out_sof   = rd_valid && out_cnt == 6'd0;
  assign out_eof   = rd_valid && out_cnt == 6'(WORDS_PER_EVENT - 1);

  // ---------------------------------------------------------------- status
  function automatic logic [15:0] sat_add(input logic [15:0] c, input logic [2:0] n);
    logic [16:0] s;
    s = {1'b0, c} + 17'(n);
    return s[16] ? 16'hFFFF : s[15:0];
  endfunction

  function automatic logic [2:0] ones(input logic [3:0] v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else begin
      status.bxid_err   <= sat_add(status.bxid_err,   ones(e_bx));
      status.parity_err <= sat_add(status.parity_err, ones(e_par));
      status.crc_err    <= sat_add(status.crc_err,    ones(e_crc));
      status.sync_err   <= sat_add(status.sync_err,   ones(e_sync) + 3'(misaligned));
      status.evid_err   <= sat_add(status.evid_err,   3'(err_evid));
      status.dropped    <= sat_add(status.dropped,    3'(drop_event));
      status.lost       <= sat_add(status.lost,       3'(lost_burst));
      status.ttc_ovf    <= sat_add(status.ttc_ovf,    3'(err_derand_ovf) + 3'(err_dec_ovf));
      status.test_ok    <= sat_add(status.test_ok,    ones(t_ok));
      status.test_err   <= sat_add(status.test_err,   ones(t_err));
    end
  end
endmodule
