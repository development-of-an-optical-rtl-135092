// Shared constants, types and functions of the RICH HPD read-out chain.
//
// An HPD event leaves the Level-0 PInt chip as 36 words of 32 bits
// (header, error word, 32 pixel rows, column parity, CRC trailer), one
// word per 25 ns bunch crossing, split into two 16-bit halves that travel
// on two fibres. The Level-1 controller receives four such 16-bit streams
// (two HPDs) and stores one word of each per bunch crossing as a 4-word
// burst of 18-bit words in a QDR SRAM.
//
// The numbers below follow the document (32x32 pixels, 36 words, 12-bit
// bunch ID wrapping every 3563 crossings, 18-bit QDR words, 16-deep
// derandomiser). The header layout, the CRC polynomial and the short
// broadcast bit assignment are this design's own choices.
package rich_pkg;

  // Event format
  localparam int unsigned PIX_ROWS        = 32;  // rows of 32 pixels per HPD
  localparam int unsigned PIX_COLS        = 32;
  localparam int unsigned WORDS_PER_EVENT = 36;  // header + errors + 32 rows + parity + trailer
  localparam int unsigned WORD_HEADER     = 0;
  localparam int unsigned WORD_ERRORS     = 1;
  localparam int unsigned WORD_DATA0      = 2;
  localparam int unsigned WORD_PARITY     = 34;
  localparam int unsigned WORD_TRAILER    = 35;

  // Bunch crossing identifier
  localparam int unsigned BXID_W   = 12;
  localparam int unsigned BX_ORBIT = 3563;       // crossings per turn

  // Each 16-bit half of the header carries this marker nibble above the BX ID.
  localparam logic [3:0] HDR_MARK = 4'hA;

  // Per-fibre trailer check: CRC-16-CCITT (x^16 + x^12 + x^5 + 1), preset to all ones.
  localparam logic [15:0] CRC_POLY = 16'h1021;
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  // QDR SRAM
  localparam int unsigned QDR_WORD_W = 18;
  localparam int unsigned QDR_ADDR_W = 17;       // 128K addresses x 4-word bursts = 9 Mbit
  localparam int unsigned QDR_BURST  = 4;
  localparam int unsigned N_FIBRES   = 4;        // one QDR serves two HPDs = four fibres

  typedef logic [15:0]           half_word_t;
  typedef logic [QDR_WORD_W-1:0] qdr_word_t;
  typedef qdr_word_t [QDR_BURST-1:0] qdr_burst_t;

  // PInt error word bits (the remaining bits are reserved and sent as zero)
  localparam int unsigned ERR_BXFIFO_OVF = 0;    // a Level-0 accept was lost, BX FIFO full
  localparam int unsigned ERR_BUF_OVF    = 1;    // pixel row lost, data buffer full
  localparam int unsigned ERR_TTC_SINGLE = 2;    // TTCrx reported a corrected single-bit error
  localparam int unsigned ERR_TTC_DOUBLE = 3;    // TTCrx reported an uncorrectable error
  localparam int unsigned ERR_LINK_DOWN  = 4;    // a GOL was not ready while event words were sent

  // Level-1 36-bit transmission check word, one bit stamped on each stored word
  localparam int unsigned CHK_START   = 0;       // first word of an event
  localparam int unsigned CHK_MARK    = 1;       // header marker nibble wrong
  localparam int unsigned CHK_BXID    = 2;       // header BX ID differs from the local one
  localparam int unsigned CHK_RXERR   = 3;       // receiver flagged an error on word 0..2
  localparam int unsigned CHK_EVID    = 4;       // bits 4 and 5: the event ID's two LSBs
  localparam int unsigned CHK_PARITY  = 34;      // column parity mismatch
  localparam int unsigned CHK_CRC     = 35;      // trailer CRC mismatch

  // Short broadcast byte of the TTCrx as used here
  localparam int unsigned BC_BCR    = 0;         // bunch counter reset
  localparam int unsigned BC_ECR    = 1;         // event counter reset
  localparam int unsigned BC_L1     = 5;         // Level-1 decision present
  localparam int unsigned BC_ACCEPT = 4;         // Level-1 decision: 1 accept, 0 reject
  localparam int unsigned BC_EVID_L = 6;         // bits 7:6 carry the event ID LSBs

  // Level-1 controller error counters, reported to the ECS
  typedef struct packed {
    logic [15:0] bxid_err;      // header BX ID mismatches (all fibres)
    logic [15:0] parity_err;    // parity mismatches
    logic [15:0] crc_err;       // CRC mismatches
    logic [15:0] sync_err;      // framing errors and misaligned fibres
    logic [15:0] evid_err;      // event ID mismatches on Level-1 decisions
    logic [15:0] dropped;       // events not stored, buffer full
    logic [15:0] lost;          // bursts lost, write machine busy
    logic [15:0] ttc_ovf;       // derandomiser or decision buffer overflows
    logic [15:0] test_ok;       // link test pattern words received in sequence
    logic [15:0] test_err;      // link test pattern words out of sequence
  } l1_status_t;

  // One 16-bit step of the fibre CRC (bits taken MSB first).
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] data);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = (c << 1) ^ CRC_POLY;
      else                 c = c << 1;
    end
    return c;
  endfunction

endpackage
