// Self-checking test of tap_controller: random TMS for many TCK cycles,
// the state compared with a reference transition table of the IEEE 1149.1
// TAP (written here as arrays indexed by state name), the decoded strobes
// checked, and five TMS=1 cycles shown to reach Test-Logic-Reset from every
// state visited.
module tb_tap_controller;
  logic tck = 0, trst_n = 0, tms = 1;
  logic tlr, cdr, sdr, udr, cir, sir, uir;
  logic [3:0] st;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .test_logic_reset(tlr), .capture_dr(cdr),
    .shift_dr(sdr), .update_dr(udr), .capture_ir(cir), .shift_ir(sir), .update_ir(uir), .state_o(st));

  always #5 tck = ~tck;

  // state names in the standard's order and their successors for TMS=0/1
  typedef enum int {TLR, RTI, SDS, CDR, SDR, E1D, PDR, E2D, UDR, SIS, CIR, SIR, E1I, PIR, E2I, UIR} s_t;
  s_t n0 [16] = '{RTI, RTI, CDR, SDR, SDR, PDR, PDR, SDR, RTI, CIR, SIR, SIR, PIR, PIR, SIR, RTI};
  s_t n1 [16] = '{TLR, SDS, SIS, E1D, E1D, UDR, E2D, UDR, SDS, TLR, E1I, E1I, UIR, E2I, UIR, SDS};
  // standard 4-bit state codes
  logic [3:0] code [16] = '{4'hF, 4'hC, 4'h7, 4'h6, 4'h2, 4'h1, 4'h3, 4'h0, 4'h5, 4'h4, 4'hE, 4'hA, 4'h9, 4'hB, 4'h8, 4'hD};
  s_t model;
  bit seen [16];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s state %0d", what, model); end
  endtask

  initial begin
    repeat (50000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = TLR;
    repeat (2) @(negedge tck);
    trst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge tck);
      check(st == code[model], "state code");
      check(tlr == (model == TLR) && cdr == (model == CDR) && sdr == (model == SDR) &&
            udr == (model == UDR) && cir == (model == CIR) && sir == (model == SIR) &&
            uir == (model == UIR), "strobes");
      seen[model] = 1;
      if (i % 97 == 50) begin
        // five ones reset the TAP from anywhere
        for (int j = 0; j < 5; j++) begin
          tms = 1;
          @(posedge tck);
          model = n1[model];
          @(negedge tck);
        end
        check(model == TLR && tlr, "five TMS ones reach Test-Logic-Reset");
      end
      tms = ($urandom_range(0, 2) == 0);
      @(posedge tck);
      model = tms ? n1[model] : n0[model];
    end
    for (int s = 0; s < 16; s++) check(seen[s], "every state visited");
    // asynchronous reset
    @(negedge tck); tms = 0; @(negedge tck); trst_n = 0; #1;
    check(tlr, "TRST* resets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
