// JTAG control of the PInt chip.
//
// The Experiment Control System reaches the PInt over JTAG. A standard TAP
// controller (tap_controller) steps through the IEEE 1149.1 states; behind
// it sit a 4-bit instruction register and these data registers:
//   BYPASS (4'hF)  1-bit bypass
//   CONFIG (4'h2)  CFG_W-bit PInt configuration, bit 0 = link test pattern on
//   STATUS (4'h4)  32-bit error/status word captured from the chip, so the
//                  ECS learns of the error conditions the PInt flags
//   PIXEL  (4'h3)  the pixel chip's DAC configuration chain (44 DACs of 8
//                  bits) is placed between TDI and TDO: the PInt drives the
//                  chain's shift and update strobes and returns its output
// That the pixel chip's 44 8-bit DACs are loaded over JTAG through the PInt
// follows the document; the instruction codes, the register set and the
// strobe interface to the pixel chip are this design's own choices.
//
// SEU protection: the configuration register is triplicated with a
// majority vote and is rewritten from the vote on every TCK. The document
// says only that redundancy and error correction were added to the
// control logic; this scheme, and applying it to the configuration, are
// this design's choice. A repair needs TCK to run.
//
// Timing: registers shift on rising TCK; TDO changes on falling TCK, as the
// standard requires. Configuration takes effect at Update-DR.
module pint_jtag #(
  parameter int unsigned CFG_W = 8
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tms,
  input  logic             tdi,
  output logic             tdo,
  // PInt side
  output logic [CFG_W-1:0] cfg,
  input  logic [31:0]      status,
  // pixel chip DAC chain
  output logic             pix_shift,
  output logic             pix_update,
  output logic             pix_sdi,
  input  logic             pix_sdo
);
  localparam logic [3:0] I_BYPASS = 4'hF;
  localparam logic [3:0] I_CONFIG = 4'h2;
  localparam logic [3:0] I_PIXEL  = 4'h3;
  localparam logic [3:0] I_STATUS = 4'h4;

  logic tlr, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;
  logic [3:0] tap_state;

  tap_controller u_tap (
    .tck, .trst_n, .tms,
    .test_logic_reset(tlr), .capture_dr(cap_dr), .shift_dr(sh_dr), .update_dr(upd_dr),
    .capture_ir(cap_ir), .shift_ir(sh_ir), .update_ir(upd_ir), .state_o(tap_state)
  );

  logic [3:0]       ir_sr, ir;
  logic             byp_sr;
  logic [CFG_W-1:0] cfg_sr;
  logic [31:0]      st_sr;

  // instruction register: captures 4'b0001 as the standard demands
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sr <= 4'b0001;
      ir    <= I_BYPASS;
    end else begin
      if (tlr)         ir    <= I_BYPASS;
      else if (upd_ir) ir    <= ir_sr;
      if (cap_ir)      ir_sr <= 4'b0001;
      else if (sh_ir)  ir_sr <= {tdi, ir_sr[3:1]};
    end
  end

  // configuration, held three times against single event upsets: cfg is
  // the bitwise majority of the copies, and every TCK rewrites all three
  // with the majority (or with the new value), so one upset copy is
  // outvoted at once and repaired on the next TCK edge
  logic [CFG_W-1:0] cfg_a, cfg_b, cfg_c, cfg_next;
  assign cfg = (cfg_a & cfg_b) | (cfg_a & cfg_c) | (cfg_b & cfg_c);

  always_comb begin
    cfg_next = cfg;
    if (tlr)                           cfg_next = '0;
    else if (upd_dr && ir == I_CONFIG) cfg_next = cfg_sr;
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      cfg_a <= '0;
      cfg_b <= '0;
      cfg_c <= '0;
    end else begin
      cfg_a <= cfg_next;
      cfg_b <= cfg_next;
      cfg_c <= cfg_next;
    end
  end

  // data registers
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      byp_sr <= 1'b0;
      cfg_sr <= '0;
      st_sr  <= '0;
    end else begin
      unique case (ir)
        I_CONFIG: begin
          if (cap_dr)      cfg_sr <= cfg;
          else if (sh_dr)  cfg_sr <= {tdi, cfg_sr[CFG_W-1:1]};
        end
        I_STATUS: begin
          if (cap_dr)      st_sr <= status;
          else if (sh_dr)  st_sr <= {tdi, st_sr[31:1]};
        end
        default: begin
          if (cap_dr)      byp_sr <= 1'b0;
          else if (sh_dr)  byp_sr <= tdi;
        end
      endcase
    end
  end

  assign pix_shift  = sh_dr  && (ir == I_PIXEL);
  assign pix_update = upd_dr && (ir == I_PIXEL);
  assign pix_sdi    = tdi;

  logic tdo_next;
  always_comb begin
    if (sh_ir) tdo_next = ir_sr[0];
    else begin
      unique case (ir)
        I_CONFIG: tdo_next = cfg_sr[0];
        I_STATUS: tdo_next = st_sr[0];
        I_PIXEL:  tdo_next = pix_sdo;
        default:  tdo_next = byp_sr;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_next;
  end
endmodule
