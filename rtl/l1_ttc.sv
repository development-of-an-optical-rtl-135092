// Level-1 TTC interface.
//
// The Level-1 controller gets its timing and trigger information from a
// second TTCrx:
//  - a local bunch crossing counter (wrapping every 3563 crossings, reset by
//    the bunch counter reset broadcast) gives the BX ID of every Level-0
//    accept; these IDs go into a 16-deep derandomiser that mirrors the
//    Level-0 buffering on the detector, and the head is compared with the
//    header of the next event that arrives over the fibres;
//  - the 8-bit short broadcast carries resets, the Level-1 decisions and two
//    event ID bits. A locally counted event ID (Level-1 decisions since the
//    last event counter reset) is compared with those two bits, so that lost
//    fragments or lost synchronisation show up;
//  - the Level-1 decisions are buffered, because writes have priority over
//    reads and an event may not have been stored yet when its decision comes.
// Broadcast bits used here: 0 bunch counter reset, 1 event counter reset,
// 5 decision present, 4 accept (1) or reject (0), 7:6 event ID LSBs. The
// document fixes only the two event ID bits; the other assignments and the
// decision buffer depth are this design's choices.
//
// Interface: ce is the bunch crossing enable; every input is sampled only
// when ce is high. bx_pop takes the derandomiser head; dec_pop the decision
// buffer head. Error outputs pulse once per error.
module l1_ttc
  import rich_pkg::*;
#(
  parameter int unsigned DERAND_DEPTH = 16,
  parameter int unsigned DEC_DEPTH    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        l0_accept,
  input  logic        brcst_str,
  input  logic [7:0]  brcst,
  output logic [11:0] bxid,
  // derandomiser
  input  logic        bx_pop,
  output logic [11:0] bx_head,
  output logic        bx_empty,
  // Level-1 decisions
  input  logic        dec_pop,
  output logic        dec_valid,
  output logic        dec_accept,
  output logic [1:0]  event_id,
  // errors
  output logic        err_evid,
  output logic        err_derand_ovf,
  output logic        err_dec_ovf
);
  logic bcr, ecr, l1;
  logic derand_full, dec_full, dec_empty;
  logic [$clog2(DERAND_DEPTH+1)-1:0] derand_count;
  logic [$clog2(DEC_DEPTH+1)-1:0]    dec_count;
  logic [1:0] local_evid;

  assign bcr = ce && brcst_str && brcst[BC_BCR];
  assign ecr = ce && brcst_str && brcst[BC_ECR];
  assign l1  = ce && brcst_str && brcst[BC_L1];

  bx_counter #(.W(BXID_W), .ORBIT(BX_ORBIT)) u_bx (
    .clk, .rst_n, .ce, .bcr, .bxid
  );

  sync_fifo #(.WIDTH(BXID_W), .DEPTH(DERAND_DEPTH)) u_derand (
    .clk, .rst_n, .push(ce && l0_accept), .wr_data(bxid), .pop(bx_pop),
    .rd_data(bx_head), .full(derand_full), .empty(bx_empty), .count(derand_count)
  );

  sync_fifo #(.WIDTH(1), .DEPTH(DEC_DEPTH)) u_dec (
    .clk, .rst_n, .push(l1), .wr_data(brcst[BC_ACCEPT]), .pop(dec_pop),
    .rd_data(dec_accept), .full(dec_full), .empty(dec_empty), .count(dec_count)
  );
  assign dec_valid = !dec_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_evid     <= '0;
      err_evid       <= 1'b0;
      err_derand_ovf <= 1'b0;
      err_dec_ovf    <= 1'b0;
    end else begin
      err_evid       <= l1 && (brcst[BC_EVID_L +: 2] != local_evid);
      err_derand_ovf <= ce && l0_accept && derand_full;
      err_dec_ovf    <= l1 && dec_full;
      if (ecr)     local_evid <= '0;
      else if (l1) local_evid <= local_evid + 1'b1;
    end
  end
  assign event_id = local_evid;
endmodule
