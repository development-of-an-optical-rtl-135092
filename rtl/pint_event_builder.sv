// PInt event builder (timing/control and the 32-bit wide data buffer).
//
// On each Level-0 accept the pixel chip sends its 32x32 binary hit map as 32
// rows of 32 bits. The rows are held in a data buffer; once a complete event
// is buffered and its bunch crossing ID is at the head of the BX FIFO, the
// builder sends the 36-word event of the document, one 32-bit word per
// bunch crossing (36 x 25 ns = 900 ns):
//   word 0      header   {HDR_MARK, bxid, HDR_MARK, bxid} - each 16-bit half
//                        carries the 12-bit BX ID so each fibre can be checked
//   word 1      32-bit error word (sticky flags collected since last event)
//   words 2-33  pixel rows 0..31
//   word 34     parity: bit i is the XOR of bit i of the 32 rows
//   word 35     trailer: {CRC of the upper halves, CRC of the lower halves}
//               of words 0..34, i.e. a CRC over what each fibre carries
// Event order, error word, parity and CRC trailer follow the document; the
// header layout, the CRC polynomial (CRC-16-CCITT per fibre), the error bit
// assignment and the buffer depth are this design's choices, as the
// document leaves them open.
//
// Interface: pix_valid/pix_row push rows; bx_* is the BX FIFO head (pop on
// header); err_set pulses set error bits. ev_valid/ev_sof/ev_word is the
// event stream, one word per clock. No back-pressure: the links are always
// ready. Timing: first header one clock after an event is complete.
module pint_event_builder
  import rich_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [31:0] pix_row,
  input  logic        bx_empty,
  input  logic [11:0] bx_head,
  output logic        bx_pop,
  input  logic [31:0] err_set,
  output logic        ev_valid,
  output logic        ev_sof,
  output logic [31:0] ev_word,
  output logic        buf_overflow
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic [31:0] row;
  logic        buf_full, buf_empty, row_pop;
  logic [CW-1:0] buf_count;

  sync_fifo #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(pix_valid), .wr_data(pix_row), .pop(row_pop),
    .rd_data(row), .full(buf_full), .empty(buf_empty), .count(buf_count)
  );
  assign buf_overflow = pix_valid && buf_full;

  logic        active;
  logic [5:0]  widx;
  logic [31:0] parity, sticky;
  logic [15:0] crc_hi, crc_lo;
  logic        start;
  logic [11:0] bx_hold;

  // a new event may follow the trailer of the previous one without a gap
  assign start  = (!active || widx == 6'(WORDS_PER_EVENT - 1)) && !bx_empty
                  && (buf_count >= CW'(PIX_ROWS));

  // word being sent this clock
  logic [31:0] word_now;
  always_comb begin
    if (widx == 6'(WORD_HEADER))       word_now = {HDR_MARK, bx_hold, HDR_MARK, bx_hold};
    else if (widx == 6'(WORD_ERRORS))  word_now = sticky;
    else if (widx == 6'(WORD_PARITY))  word_now = parity;
    else if (widx == 6'(WORD_TRAILER)) word_now = {crc_hi, crc_lo};
    else                               word_now = row;
  end

  assign row_pop = active && widx >= 6'(WORD_DATA0) && widx < 6'(WORD_PARITY);
  assign bx_pop  = start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      widx     <= '0;
      parity   <= '0;
      crc_hi   <= CRC_INIT;
      crc_lo   <= CRC_INIT;
      sticky   <= '0;
      bx_hold  <= '0;
      ev_valid <= 1'b0;
      ev_sof   <= 1'b0;
      ev_word  <= '0;
    end else begin
      // error flags are sticky until they have been sent in an error word
      if (active && widx == 6'(WORD_ERRORS)) sticky <= err_set | (buf_overflow ? 32'(1) << ERR_BUF_OVF : '0);
      else sticky <= sticky | err_set | (buf_overflow ? 32'(1) << ERR_BUF_OVF : '0);

      ev_valid <= active;
      ev_sof   <= active && widx == 6'(WORD_HEADER);
      ev_word  <= active ? word_now : '0;

      if (active) begin
        if (row_pop) parity <= parity ^ row;
        if (widx != 6'(WORD_TRAILER)) begin
          crc_hi <= crc16_word(crc_hi, word_now[31:16]);
          crc_lo <= crc16_word(crc_lo, word_now[15:0]);
        end
      end

      if (start) begin
        active  <= 1'b1;
        widx    <= '0;
        bx_hold <= bx_head;
        parity  <= '0;
        crc_hi  <= CRC_INIT;
        crc_lo  <= CRC_INIT;
      end else if (active) begin
        if (widx == 6'(WORDS_PER_EVENT - 1)) active <= 1'b0;
        widx <= widx + 1'b1;
      end
    end
  end
endmodule
