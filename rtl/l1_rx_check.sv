// Level-1 transmission check of one fibre.
//
// Each fibre delivers, through its receiver, the 16-bit halves of a PInt
// event: 36 words, one per bunch crossing, the header marked by the G-Link
// flag line. The QDR stores 18-bit words, so two bits per word are free:
// bit 16 carries, one bit per word, a 36-bit check word stamped onto the
// side of the event, and bit 17 the receiver's error flag for that word.
// Check word bits (bit n travels with word n):
//   0  start of event (always 1 on the header word)
//   1  header marker nibble wrong
//   2  header BX ID differs from the locally generated BX ID (expected_bxid,
//      from the derandomiser of Level-0 accepts)
//   3  the receiver flagged an error on one of words 0..2
//   4  bit 0 of the local event ID of this event (event_id at the header)
//   5  bit 1 of the local event ID, so that the event ID is stored with the
//      data and can be matched against the Level-1 decision's event ID bits
//   34 column parity of the data rows differs from the parity word
//   35 CRC of words 0..34 differs from the trailer
// A check bit can only depend on words already received, hence this order.
// Storing the BX ID check and a transmission check word in the two spare
// bits follows the document; the bit layout is this design's choice.
//
// Link self test: words outside an event are taken as the PInt's link test
// pattern, which counts up on one fibre of a pair and down on the other. A
// word one above or one below the previous such word pulses test_ok; any
// other word outside an event is a framing error (err_sync), and if it
// follows a pattern word also a pattern error (test_err). This check is
// this design's choice.
//
// Interface: ce marks the clock in which rx_* holds a new word. out_valid
// with out_word, out_idx (word number) follows one clock later.
// hdr_seen pulses with the header so the derandomiser can be popped; the
// err_* outputs pulse with the word that shows the error.
module l1_rx_check
  import rich_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        rx_valid,
  input  logic        rx_flag,
  input  logic        rx_err,
  input  logic [15:0] rx_d,
  input  logic [11:0] expected_bxid,
  input  logic [1:0]  event_id,
  output logic        hdr_seen,
  output logic        out_valid,
  output qdr_word_t   out_word,
  output logic [5:0]  out_idx,
  output logic        err_bxid,
  output logic        err_parity,
  output logic        err_crc,
  output logic        err_sync,     // header flag missing or early
  output logic        test_ok,      // link test pattern word in sequence
  output logic        test_err      // link test pattern word out of sequence
);
  logic [5:0]  idx;          // index of the next word
  logic        in_event;
  logic        mark_bad, bx_bad, rxe;
  logic [1:0]  ev_hold;
  logic [15:0] tp_prev;
  logic        tp_have, tp_step;
  logic [15:0] par, crc;
  logic [5:0]  widx;
  logic        chk;
  logic        word;

  assign word     = ce && rx_valid;
  // a flagged word always starts an event
  assign widx     = rx_flag ? 6'd0 : idx;
  assign hdr_seen = word && rx_flag;
  assign tp_step  = (rx_d == tp_prev + 16'd1) || (rx_d == tp_prev - 16'd1);

  always_comb begin
    chk = 1'b0;
    unique case (widx)
      6'(CHK_START):  chk = 1'b1;
      6'(CHK_MARK):   chk = mark_bad;
      6'(CHK_BXID):   chk = bx_bad;
      6'(CHK_RXERR):  chk = rxe;
      6'(CHK_EVID):   chk = ev_hold[0];
      6'(CHK_EVID+1): chk = ev_hold[1];
      6'(CHK_PARITY): chk = (rx_d != par);
      6'(CHK_CRC):    chk = (rx_d != crc);
      default:        chk = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; in_event <= 1'b0; mark_bad <= 1'b0; bx_bad <= 1'b0; rxe <= 1'b0;
      ev_hold <= '0;
      tp_prev <= '0; tp_have <= 1'b0; test_ok <= 1'b0; test_err <= 1'b0;
      par <= '0; crc <= CRC_INIT;
      out_valid <= 1'b0; out_word <= '0; out_idx <= '0;
      err_bxid <= 1'b0; err_parity <= 1'b0; err_crc <= 1'b0; err_sync <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      err_bxid   <= 1'b0;
      err_parity <= 1'b0;
      err_crc    <= 1'b0;
      err_sync   <= 1'b0;
      test_ok    <= 1'b0;
      test_err   <= 1'b0;
      if (word && (in_event || rx_flag)) begin
        tp_have   <= 1'b0;
        out_valid <= 1'b1;
        out_word  <= {rx_err, chk, rx_d};
        out_idx   <= widx;
        if (rx_flag) begin
          mark_bad <= (rx_d[15:12] != HDR_MARK);
          bx_bad   <= (rx_d[11:0] != expected_bxid);
          rxe      <= rx_err;
          ev_hold  <= event_id;
          par      <= '0;
          crc      <= crc16_word(CRC_INIT, rx_d);
          err_bxid <= (rx_d[11:0] != expected_bxid);
          err_sync <= in_event;                 // previous event cut short
        end else begin
          if (widx < 6'(CHK_RXERR)) rxe <= rxe | rx_err;
          if (widx >= 6'(WORD_DATA0) && widx < 6'(WORD_PARITY)) par <= par ^ rx_d;
          if (widx < 6'(WORD_TRAILER)) crc <= crc16_word(crc, rx_d);
          if (widx == 6'(WORD_PARITY))  err_parity <= (rx_d != par);
          if (widx == 6'(WORD_TRAILER)) err_crc    <= (rx_d != crc);
        end
        idx      <= (widx == 6'(WORDS_PER_EVENT - 1)) ? 6'd0 : widx + 1'b1;
        in_event <= (widx != 6'(WORDS_PER_EVENT - 1));
      end else if (word) begin                  // data outside an event
        if (tp_have && tp_step) test_ok <= 1'b1;
        else begin
          err_sync <= 1'b1;
          test_err <= tp_have;
        end
        tp_prev <= rx_d;
        tp_have <= 1'b1;
      end
    end
  end
endmodule
