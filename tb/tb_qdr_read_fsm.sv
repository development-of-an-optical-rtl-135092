// Self-checking test of qdr_read_fsm with the QDR model preloaded with
// random bursts. The testbench asks for bursts at consecutive addresses and
// plays the write machine's hold_read, taking rising K edges at random (at
// most every other one, as the write machine does). Checked: every burst
// returns in order with the preloaded content, RPS# never shares an edge
// with a write address, and with no writes the reads run back to back, one
// burst per 4 clocks (25 ns).
module tb_qdr_read_fsm;
  import rich_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ph;
  logic k, hold_read = 0, rd_req = 0, issue, rps_n, rd_valid;
  logic [16:0] rd_addr = '0, sa;
  qdr_word_t q;
  qdr_burst_t rd_burst;
  int perr, nw, nr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) ph <= '0; else ph <= ph + 1'b1;
  assign k = ph[0];

  qdr_read_fsm dut (.clk, .rst_n, .k, .hold_read, .rd_req, .rd_addr, .issue, .rps_n, .sa,
    .q, .rd_valid, .rd_burst);
  // the write machine's address cycles are shown to the model as WPS#
  qdr_sram_model u_qdr (.clk, .k, .wps_n(!hold_read), .rps_n, .sa, .d(18'h0), .q,
    .protocol_errors(perr), .writes(nw), .reads(nr));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int N = 2000;
  logic [71:0] img [N];
  int n_got = 0, cyc = 0, last_valid = -100, n_b2b = 0, n_held = 0;
  bit busy_writes = 1;

  // hold_read: in cycles ending on a rising K edge only, never two in a row
  logic held_last = 0;
  always @(negedge clk) begin
    if (!rst_n || ph[0]) hold_read <= 0;
    else begin
      hold_read <= busy_writes && !held_last && ($urandom_range(0, 1) == 1);
    end
  end
  always @(posedge clk) if (!k) held_last <= hold_read;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (issue) begin
      check(!hold_read, "no read on a write edge");
      rd_addr <= rd_addr + 1'b1;
    end
    if (hold_read && rd_req && !k) n_held++;
    if (rd_valid) begin
      check(rd_burst == img[n_got], $sformatf("burst %0d", n_got));
      if (!busy_writes && cyc - last_valid == 4) n_b2b++;
      last_valid = cyc;
      n_got++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin
      img[a] = {$urandom, $urandom, 8'($urandom)};
      u_qdr.poke(a, img[a]);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rd_req = 1;
    while (rd_addr < N / 2) @(negedge clk);
    busy_writes = 0;
    while (rd_addr < N) @(negedge clk);
    rd_req = 0;
    repeat (20) @(negedge clk);
    check(n_got == N, $sformatf("%0d bursts read", n_got));
    check(perr == 0, "QDR protocol");
    check(n_held > 0, "reads deferred by writes");
    check(n_b2b > N / 2 - 10, $sformatf("back-to-back reads (%0d)", n_b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
