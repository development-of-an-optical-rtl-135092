// Self-checking test of pint_jtag: drives TMS/TDI as an ECS would and checks
//  - BYPASS after reset: TDO repeats TDI one TCK later;
//  - IR capture value 0001 shifted out while a new instruction goes in;
//  - CONFIG: a value written shows on cfg after Update-DR and reads back;
//  - CONFIG with 200 random values, each read back by the next scan;
//  - STATUS: the status input is captured and shifted out (fixed, then
//    100 random values);
//  - BYPASS by instruction 1111 on 20 random 64-bit streams;
//  - PIXEL: 352 bits reach the 44 pixel DACs and the old chain content
//    comes back on TDO.
module tb_pint_jtag;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic [7:0] cfg;
  logic [31:0] status = 32'hC0DE_1234;
  logic pshift, pupd, psdi, psdo;
  logic [351:0] dac;
  int checks = 0, failures = 0;

  pint_jtag dut (.tck, .trst_n, .tms, .tdi, .tdo, .cfg, .status,
    .pix_shift(pshift), .pix_update(pupd), .pix_sdi(psdi), .pix_sdo(psdo));
  pixel_dac_chain_model u_pix (.tck, .shift(pshift), .update(pupd), .sdi(psdi), .sdo(psdo), .dac);

  always #50 tck = ~tck;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input logic m, input logic d);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  // from Run-Test/Idle, shift n bits into IR or DR, return to Run-Test/Idle
  task automatic scan(input bit ir, input int n, input logic [351:0] din, output logic [351:0] dout);
    dout = '0;
    step(1, 0);                 // Select-DR
    if (ir) step(1, 0);         // Select-IR
    step(0, 0);                 // Capture
    step(0, 0);                 // Shift
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
    step(1, 0);                 // Update
    step(0, 0);                 // Run-Test/Idle
    #1;
  endtask

  logic [351:0] o, pat1, pat2;
  logic [7:0]   v, prev;

  initial begin
    repeat (40000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    trst_n = 1;
    step(0, 0);
    // BYPASS is the instruction after reset: 1-bit delay, captured 0
    scan(0, 8, 352'hB5, o);
    check(o[7:0] == 8'h6A, $sformatf("bypass delay (got %h)", o[7:0]));
    // CONFIG
    scan(1, 4, 352'h2, o);
    check(o[3:0] == 4'b0001, "IR capture value");
    scan(0, 8, 352'h5B, o);
    check(cfg == 8'h5B, "config written");
    scan(0, 8, 352'h01, o);
    check(o[7:0] == 8'h5B && cfg == 8'h01, "config read back and rewritten");
    // STATUS
    scan(1, 4, 352'h4, o);
    scan(0, 32, '0, o);
    check(o[31:0] == 32'hC0DE_1234, "status captured");
    check(cfg == 8'h01, "config kept while status read");
    // random CONFIG values, each read back by the next scan
    scan(1, 4, 352'h2, o);
    prev = cfg;
    for (int k = 0; k < 200; k++) begin
      v = 8'($urandom);
      scan(0, 8, 352'(v), o);
      check(o[7:0] == prev && cfg == v, $sformatf("config %h read back as %h", prev, o[7:0]));
      prev = v;
    end
    // random STATUS values
    scan(1, 4, 352'h4, o);
    for (int k = 0; k < 100; k++) begin
      status = $urandom;
      scan(0, 32, '0, o);
      check(o[31:0] == status && cfg == prev, $sformatf("status %h captured as %h", status, o[31:0]));
    end
    // BYPASS selected by instruction 1111: 1-bit delay on random streams
    scan(1, 4, 352'hF, o);
    for (int k = 0; k < 20; k++) begin
      pat1 = '0;
      pat1[63:0] = {$urandom, $urandom};
      scan(0, 64, pat1, o);
      check(o[0] == 1'b0, "bypass captures 0");
      for (int i = 0; i < 63; i++) check(o[i+1] == pat1[i], $sformatf("bypass bit %0d", i));
    end
    // PIXEL DAC chain
    for (int i = 0; i < 11; i++) begin
      pat1[i*32 +: 32] = $urandom;
      pat2[i*32 +: 32] = $urandom;
    end
    scan(1, 4, 352'h3, o);
    scan(0, 352, pat1, o);
    check(dac == pat1, "44 DACs loaded");
    scan(0, 352, pat2, o);
    check(dac == pat2, "44 DACs reloaded");
    check(o == pat1, "old DAC settings shifted out");
    // back to bypass by five TMS ones
    repeat (5) step(1, 0);
    step(0, 0);
    check(cfg == 8'h00, "test-logic-reset clears config");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
