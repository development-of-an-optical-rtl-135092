// PInt: pixel interface chip between the HPD binary pixel chip and the GOLs.
//
// Runs on the 40.08 MHz bunch crossing clock from the TTCrx. A bunch crossing
// counter (reset by the TTC bunch counter reset, wrapping every 3563
// crossings) gives the 12-bit BX ID; on every Level-0 accept that ID is
// pushed into a 16x12 FIFO. The pixel chip's 32 rows of each accepted event
// go into the event builder, which sends header, error word, the 32 rows,
// the column parity and the CRC trailer as 36 words of 32 bits. gol_sync
// splits them onto the two 16-bit GOL inputs. The ECS configures the chip
// and the pixel chip's DACs through the JTAG block, and can read a sticky
// status word of every error flagged since the last clear.
// The block structure follows the document's PInt diagram. Analogue
// supplies, DACs, GTL/CMOS level translation and the GOLs are outside.
//
// Configuration bits (JTAG CONFIG register): bit 0 link test mode,
// bit 1 clear the status word (held while set).
// Timing: a header leaves on the GOL pins 3 clocks after the last row of a
// complete event enters (buffer, builder and GOL registers), when the BX
// FIFO holds the event's ID; an event then takes 36 clocks (900 ns).
module pint_top
  import rich_pkg::*;
(
  input  logic        clk40,
  input  logic        rst_n,
  // TTCrx
  input  logic        ttc_bcr,
  input  logic        ttc_l0_accept,
  input  logic        ttc_sinerr,
  input  logic        ttc_dberr,
  // pixel chip read-out
  input  logic        pix_valid,
  input  logic [31:0] pix_row,
  // ECS JTAG
  input  logic        tck,
  input  logic        trst_n,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  // pixel chip DAC chain
  output logic        pix_shift,
  output logic        pix_update,
  output logic        pix_sdi,
  input  logic        pix_sdo,
  // GOLs
  input  logic [1:0]  gol_ready,
  output logic [15:0] gol_a_d,
  output logic        gol_a_en,
  output logic        gol_a_flag,
  output logic [15:0] gol_b_d,
  output logic        gol_b_en,
  output logic        gol_b_flag,
  output logic [11:0] bxid
);
  logic [7:0]  cfg;
  logic [31:0] status, err_set;
  logic [11:0] bx_head;
  logic        bx_full, bx_empty, bx_pop;
  logic [4:0]  bx_count;
  logic        ev_valid, ev_sof, buf_ovf, link_lost;
  logic [31:0] ev_word, test_word;

  bx_counter #(.W(BXID_W), .ORBIT(BX_ORBIT)) u_bx (
    .clk(clk40), .rst_n, .ce(1'b1), .bcr(ttc_bcr), .bxid
  );

  sync_fifo #(.WIDTH(BXID_W), .DEPTH(16)) u_bxfifo (
    .clk(clk40), .rst_n, .push(ttc_l0_accept), .wr_data(bxid), .pop(bx_pop),
    .rd_data(bx_head), .full(bx_full), .empty(bx_empty), .count(bx_count)
  );

  always_comb begin
    err_set = '0;
    err_set[ERR_BXFIFO_OVF] = ttc_l0_accept && bx_full;
    err_set[ERR_TTC_SINGLE] = ttc_sinerr;
    err_set[ERR_TTC_DOUBLE] = ttc_dberr;
    err_set[ERR_LINK_DOWN]  = link_lost;
  end

  pint_event_builder u_build (
    .clk(clk40), .rst_n, .pix_valid, .pix_row,
    .bx_empty, .bx_head, .bx_pop, .err_set,
    .ev_valid, .ev_sof, .ev_word, .buf_overflow(buf_ovf)
  );

  link_test_pattern u_ltp (.clk(clk40), .rst_n, .en(cfg[0]), .word(test_word));

  gol_sync u_gol (
    .clk(clk40), .rst_n, .test_mode(cfg[0]), .test_word,
    .ev_valid, .ev_sof, .ev_word, .gol_ready,
    .gol_a_d, .gol_a_en, .gol_a_flag, .gol_b_d, .gol_b_en, .gol_b_flag, .link_lost
  );

  // sticky status for the ECS (crosses to TCK; read while quiet)
  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n)      status <= '0;
    else if (cfg[1]) status <= '0;
    else             status <= status | err_set | (buf_ovf ? 32'(1) << ERR_BUF_OVF : '0);
  end

  pint_jtag #(.CFG_W(8)) u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo, .cfg, .status,
    .pix_shift, .pix_update, .pix_sdi, .pix_sdo
  );
endmodule
