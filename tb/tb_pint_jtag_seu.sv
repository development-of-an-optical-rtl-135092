// Single event upset test of the PInt configuration register in pint_jtag.
// The register is held in three copies with a majority vote. Random
// configurations are written over JTAG (Update-DR); then one copy at a time
// is overwritten with a random value by force, as an upset would. The
// testbench checks that cfg keeps the written value while the copy is wrong,
// and that the copy holds the written value again one TCK after the upset
// ends. It also checks that the repaired value reads back over JTAG.
module tb_pint_jtag_seu;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic [7:0] cfg;
  logic pshift, pupd, psdi;
  int checks = 0, failures = 0;

  pint_jtag dut (.tck, .trst_n, .tms, .tdi, .tdo, .cfg, .status(32'h0),
    .pix_shift(pshift), .pix_update(pupd), .pix_sdi(psdi), .pix_sdo(1'b0));

  always #50 tck = ~tck;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic step(input logic m, input logic d);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  // from Run-Test/Idle, shift n bits into IR or DR, return to Run-Test/Idle
  task automatic scan(input bit ir, input int n, input logic [7:0] din, output logic [7:0] dout);
    dout = '0;
    step(1, 0);
    if (ir) step(1, 0);
    step(0, 0);
    step(0, 0);
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
    step(1, 0);
    step(0, 0);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] v, upset, o;
  int which;

  initial begin
    repeat (2) @(negedge tck);
    trst_n = 1;
    step(0, 0);
    scan(1, 4, 8'h2, o);
    for (int k = 0; k < 60; k++) begin
      v = 8'($urandom);
      scan(0, 8, v, o);
      check(cfg == v, "config written");
      upset = v ^ 8'($urandom | 1);      // at least one bit flipped
      which = k % 3;
      @(negedge tck);
      case (which)
        0: force dut.cfg_a = upset;
        1: force dut.cfg_b = upset;
        default: force dut.cfg_c = upset;
      endcase
      #1 check(cfg == v, $sformatf("upset in copy %0d outvoted", which));
      @(posedge tck) #1;
      check(cfg == v, $sformatf("upset in copy %0d still outvoted", which));
      @(negedge tck);
      case (which)
        0: release dut.cfg_a;
        1: release dut.cfg_b;
        default: release dut.cfg_c;
      endcase
      @(posedge tck) #1;
      check(dut.cfg_a == v && dut.cfg_b == v && dut.cfg_c == v,
            $sformatf("copy %0d repaired", which));
    end
    scan(0, 8, 8'h00, o);
    check(o == v, "repaired configuration reads back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
