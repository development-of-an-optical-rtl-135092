// Self-checking test of qdr_write_fsm with the QDR model. Bursts of four
// random 18-bit words are offered once per bunch crossing (every fourth
// clock), sometimes in long unbroken runs and sometimes with gaps. The
// testbench plays the wrap-around address counter. Checked: every burst is
// taken before the next one is offered, it lands complete at its address in
// the QDR model, WPS# only on rising K edges, and in an unbroken run a new
// address every 4 clocks (4 words per 25 ns) with D busy on every edge.
module tb_qdr_write_fsm;
  import rich_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ph;
  logic k, get_data = 0, take, wps_n, hold_read;
  qdr_burst_t data_in = '0;
  logic [16:0] wr_addr = '0, sa;
  qdr_word_t d, q;
  int perr, nw, nr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) ph <= '0; else ph <= ph + 1'b1;
  assign k = ph[0];

  qdr_write_fsm dut (.clk, .rst_n, .k, .get_data, .data_in, .take, .wr_addr,
    .wps_n, .sa, .d, .hold_read);
  qdr_sram_model u_qdr (.clk, .k, .wps_n, .rps_n(1'b1), .sa, .d, .q,
    .protocol_errors(perr), .writes(nw), .reads(nr));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [71:0] sent [int];
  int last_take = -100, cyc = 0, n_b2b = 0, n_bursts = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (take) begin
      check(!hold_read == wps_n, "hold_read marks the address cycles");
      if (cyc - last_take == 4) n_b2b++;
      last_take = cyc;
      sent[int'(wr_addr)] = data_in;
      wr_addr <= wr_addr + 1'b1;
      n_bursts++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit run;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < 3000; b++) begin
      // offer in phase 3 of a crossing, as the controller does
      while (ph != 2'd3) @(negedge clk);
      run = ((b / 50) % 2 == 0) || ($urandom_range(0, 2) == 0);
      if (!run) repeat (4 * $urandom_range(1, 3)) @(negedge clk);
      while (ph != 2'd3) @(negedge clk);
      get_data = 1;
      for (int i = 0; i < 4; i++) data_in[i] = 18'($urandom);
      @(posedge clk);
      while (!take) @(posedge clk);
      @(negedge clk) get_data = 0;
      check(ph != 2'd3, "burst taken within the crossing");
    end
    repeat (20) @(negedge clk);
    check(nw == 3000 && n_bursts == 3000, $sformatf("%0d bursts written", nw));
    foreach (sent[a]) check(u_qdr.peek(a) == sent[a], $sformatf("burst at %0d", a));
    check(perr == 0, "QDR protocol");
    check(n_b2b > 1000, $sformatf("back-to-back bursts every 4 clocks (%0d)", n_b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
