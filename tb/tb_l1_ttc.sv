// Self-checking test of l1_ttc with a bunch crossing every fourth clock.
// The testbench keeps its own bunch count (0..3562, cleared by a bunch
// counter reset broadcast) and checks that the derandomiser returns the
// bunch IDs of the Level-0 accepts in order, that the Level-1 decisions come
// out of the decision buffer in order, that a wrong event ID in a broadcast
// is flagged (and only then), that an event counter reset restarts the local
// event ID, and that a 17th unread Level-0 accept is flagged as overflow.
module tb_l1_ttc;
  logic clk = 0, rst_n = 0, ce = 0;
  logic l0_accept = 0, brcst_str = 0;
  logic [7:0] brcst = '0;
  logic [11:0] bxid, bx_head;
  logic bx_pop = 0, bx_empty, dec_pop = 0, dec_valid, dec_accept;
  logic [1:0] event_id;
  logic e_evid, e_dovf, e_covf;
  int checks = 0, failures = 0, n_evid = 0, n_dovf = 0;

  l1_ttc dut (.clk, .rst_n, .ce, .l0_accept, .brcst_str, .brcst, .bxid, .bx_pop, .bx_head,
    .bx_empty, .dec_pop, .dec_valid, .dec_accept, .event_id, .err_evid(e_evid),
    .err_derand_ovf(e_dovf), .err_dec_ovf(e_covf));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (e_evid) n_evid++;
    if (e_dovf) n_dovf++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bx = 0, evid = 0, bad_sent = 0;
  logic [11:0] bxq[$];
  bit decq[$];
  bit acc, bad;

  // one bunch crossing: drive inputs with ce high for one clock, three idle clocks
  task automatic crossing(input bit l0, input bit str, input logic [7:0] b);
    @(negedge clk);
    ce = 1; l0_accept = l0; brcst_str = str; brcst = b;
    check(bxid == 12'(bx), $sformatf("bunch count %0d vs %0d", bxid, bx));
    if (l0 && bxq.size() < 16) bxq.push_back(12'(bx));
    @(negedge clk);
    ce = 0; l0_accept = 0; brcst_str = 0;
    if (str && b[0]) bx = 0; else bx = (bx == 3562) ? 0 : bx + 1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 12000; i++) begin
      acc = $urandom_range(0, 1);
      bad = ($urandom_range(0, 49) == 0);
      if (i == 6000) crossing(0, 1, 8'h01);                 // bunch counter reset
      else if (i == 7000) begin crossing(0, 1, 8'h02); evid = 0; end   // event counter reset
      else if (i % 7 == 3) begin
        crossing($urandom_range(0, 7) == 0, 1,
                 {2'(evid) ^ (bad ? 2'b01 : 2'b00), 1'b1, acc, 4'b0});
        if (decq.size() < 16) decq.push_back(acc);
        evid++;
        if (bad) bad_sent++;
      end else crossing($urandom_range(0, 7) == 0, 0, 8'h00);
      // read the buffers now and then, as the controller would
      if (i % 5 == 0 && !bx_empty) begin
        @(negedge clk);
        check(bx_head == bxq[0], "derandomiser order");
        void'(bxq.pop_front());
        bx_pop = 1; @(negedge clk); bx_pop = 0;
      end
      if (i % 3 == 0 && dec_valid) begin
        @(negedge clk);
        check(dec_accept == decq[0], "decision order");
        void'(decq.pop_front());
        dec_pop = 1; @(negedge clk); dec_pop = 0;
      end
    end
    check(bx > 0 && n_evid == bad_sent && bad_sent > 0, $sformatf("event ID errors %0d of %0d", n_evid, bad_sent));
    // overflow: fill the derandomiser
    repeat (17) crossing(1, 0, 8'h00);
    @(negedge clk);
    check(n_dovf >= 1, "derandomiser overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
