// RICH HPD read-out chain: two HPD front ends and their Level-1 buffer.
//
// Level-0 (on detector, 40 MHz): one PInt per HPD turns each Level-0
// accepted 32x32 pixel hit map into a 36-word event and drives it onto two
// GOL links of 16 bits per bunch crossing. Level-1 (counting room): one QDR
// controller receives the four fibres of the two HPDs, checks them and
// buffers the events in a QDR SRAM until the Level-1 decision.
//
// Between the two halves lie the GOL serialisers, VCSELs, about 100 m of
// multimode fibre and the commercial receivers/deserialisers; on the
// Level-1 side sits the QDR SRAM itself. None of these is logic designed
// here, so their signals are ports: gol_* are the GOL inputs (fibre 2h is
// the lower half, 2h+1 the upper half of HPD h) and rx_* the receiver
// outputs in the same order. The two PInts share one JTAG chain
// (ECS TDI -> PInt 0 -> PInt 1 -> TDO) with common TCK and TMS.
//
// Clocks: clk40 is the TTC bunch crossing clock of the detector side;
// clk160 is the counting room's 160 MHz clock, locked to its own TTCrx
// bunch clock, reset released on a bunch crossing boundary.
module rich_readout_top
  import rich_pkg::*;
(
  // Level-0 side
  input  logic                  clk40,
  input  logic                  rst40_n,
  input  logic                  ttc0_bcr,
  input  logic                  ttc0_l0_accept,
  input  logic                  ttc0_sinerr,
  input  logic                  ttc0_dberr,
  input  logic [1:0]            pix_valid,
  input  logic [1:0][31:0]      pix_row,
  input  logic                  tck,
  input  logic                  trst_n,
  input  logic                  tms,
  input  logic                  tdi,
  output logic                  tdo,
  output logic [1:0]            pix_shift,
  output logic [1:0]            pix_update,
  output logic [1:0]            pix_sdi,
  input  logic [1:0]            pix_sdo,
  input  logic [3:0]            gol_ready,
  output logic [3:0][15:0]      gol_d,
  output logic [3:0]            gol_en,
  output logic [3:0]            gol_flag,
  // Level-1 side
  input  logic                  clk160,
  input  logic                  rst160_n,
  input  logic [3:0]            rx_valid,
  input  logic [3:0]            rx_flag,
  input  logic [3:0]            rx_err,
  input  logic [3:0][15:0]      rx_d,
  input  logic                  ttc1_l0_accept,
  input  logic                  ttc1_brcst_str,
  input  logic [7:0]            ttc1_brcst,
  output logic                  qdr_k,
  output logic                  qdr_wps_n,
  output logic                  qdr_rps_n,
  output logic [QDR_ADDR_W-1:0] qdr_sa,
  output qdr_word_t             qdr_d,
  input  qdr_word_t             qdr_q,
  output logic                  daq_valid,
  output logic                  daq_sof,
  output logic                  daq_eof,
  output qdr_burst_t            daq_burst,
  output l1_status_t            l1_status,
  output logic [15:0]           l1_events_stored
);
  logic [1:0]       tdo_chain;

  for (genvar h = 0; h < 2; h++) begin : g_hpd
    pint_top u_pint (
      .clk40, .rst_n(rst40_n),
      .ttc_bcr(ttc0_bcr), .ttc_l0_accept(ttc0_l0_accept),
      .ttc_sinerr(ttc0_sinerr), .ttc_dberr(ttc0_dberr),
      .pix_valid(pix_valid[h]), .pix_row(pix_row[h]),
      .tck, .trst_n, .tms, .tdi(h == 0 ? tdi : tdo_chain[0]), .tdo(tdo_chain[h]),
      .pix_shift(pix_shift[h]), .pix_update(pix_update[h]),
      .pix_sdi(pix_sdi[h]), .pix_sdo(pix_sdo[h]),
      .gol_ready(gol_ready[2*h +: 2]),
      .gol_a_d(gol_d[2*h]),     .gol_a_en(gol_en[2*h]),     .gol_a_flag(gol_flag[2*h]),
      .gol_b_d(gol_d[2*h + 1]), .gol_b_en(gol_en[2*h + 1]), .gol_b_flag(gol_flag[2*h + 1]),
      .bxid()
    );
  end
  assign tdo = tdo_chain[1];

  l1_controller u_l1 (
    .clk160, .rst_n(rst160_n),
    .rx_valid, .rx_flag, .rx_err, .rx_d,
    .l0_accept(ttc1_l0_accept), .brcst_str(ttc1_brcst_str), .brcst(ttc1_brcst),
    .qdr_k, .qdr_wps_n, .qdr_rps_n, .qdr_sa, .qdr_d, .qdr_q,
    .out_valid(daq_valid), .out_sof(daq_sof), .out_eof(daq_eof), .out_burst(daq_burst),
    .status(l1_status), .events_stored(l1_events_stored)
  );
endmodule
