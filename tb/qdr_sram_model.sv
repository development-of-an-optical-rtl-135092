// Behavioural model of a burst-of-4 QDR SRAM (9 Mbit: 128K addresses of
// 4 x 18-bit words), used by the testbenches only. It follows the clock
// arrangement of the controller: it is clocked by the controller's 160 MHz
// clock, and an edge that ends a cycle with k low is a rising K edge, one
// that ends a cycle with k high a rising K# edge.
//  - Write: WPS# low and the address on a rising K edge; the four words are
//    taken from D at the next rising K edge and the three edges after it.
//  - Read: RPS# low and the address on a rising K edge; the four words are
//    driven on Q so that they can be captured at the next rising K edge and
//    the three edges after it.
// WPS# and RPS# on the same edge, or on a K# edge, are counted as protocol
// errors. The array is sparse (associative) and reads as zero where unwritten.
module qdr_sram_model #(
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          k,
  input  logic          wps_n,
  input  logic          rps_n,
  input  logic [AW-1:0] sa,
  input  logic [17:0]   d,
  output logic [17:0]   q,
  output int            protocol_errors,
  output int            writes,
  output int            reads
);
  logic [71:0] mem [int];
  int          edge_n = 0;
  // two bursts may be in flight on each port (addresses every other K edge)
  int          w_edge [2] = '{-100, -100};
  int          r_edge [2] = '{-100, -100};
  logic [AW-1:0] w_a [2];
  logic [71:0] w_buf [2], r_buf [2];
  int          wsel = 0, rsel = 0;

  initial begin
    q = '0; protocol_errors = 0; writes = 0; reads = 0;
  end

  function automatic logic [71:0] peek(input int a);
    return mem.exists(a) ? mem[a] : 72'h0;
  endfunction

  task automatic poke(input int a, input logic [71:0] v);
    mem[a] = v;
  endtask

  always @(posedge clk) begin
    int wb, rb;
    edge_n++;
    // address phase
    if (!wps_n || !rps_n) begin
      if (k) begin protocol_errors++; $display("QDR: address on a K# edge at %0t", $time); end
      if (!wps_n && !rps_n) begin protocol_errors++; $display("QDR: WPS# and RPS# together at %0t", $time); end
    end
    // write data beats
    for (int j = 0; j < 2; j++) begin
      wb = edge_n - w_edge[j] - 2;
      if (wb >= 0 && wb < 4) begin
        w_buf[j][wb*18 +: 18] = d;
        if (wb == 3) begin mem[int'(w_a[j])] = w_buf[j]; writes++; end
      end
    end
    if (!wps_n && !k) begin w_edge[wsel] = edge_n; w_a[wsel] = sa; wsel = 1 - wsel; end
    // read data beats: word i is on Q for the capture at edge r_edge+2+i
    if (!rps_n && !k) begin
      r_edge[rsel] = edge_n; r_buf[rsel] = peek(int'(sa)); rsel = 1 - rsel; reads++;
    end
    q <= 18'h0;
    for (int j = 0; j < 2; j++) begin
      rb = edge_n - r_edge[j] - 1;
      if (rb >= 0 && rb < 4) q <= r_buf[j][rb*18 +: 18];
    end
  end
endmodule
