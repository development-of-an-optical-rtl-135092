// Reference functions shared by the testbenches: the expected PInt event
// for given pixel rows, worked out here independently of the RTL (the CRC
// is computed bit-serially from the polynomial's tap positions).
package tb_rich_pkg;

  typedef logic [35:0][31:0] ev_t;
  typedef logic [31:0][31:0] rows_t;

  // CRC-16-CCITT over a sequence of 16-bit words, MSB first, preset 0xFFFF
  function automatic logic [15:0] ref_crc(input logic [15:0] words [], input int n);
    logic [15:0] r;
    logic fb;
    r = 16'hFFFF;
    for (int w = 0; w < n; w++)
      for (int b = 15; b >= 0; b--) begin
        fb = r[15] ^ words[w][b];
        r  = {r[14:0], 1'b0};
        if (fb) begin
          r[0]  = ~r[0];
          r[5]  = ~r[5];
          r[12] = ~r[12];
        end
      end
    return r;
  endfunction

  function automatic ev_t ref_event(input logic [11:0] bx, input logic [31:0] err, input rows_t rows);
    ev_t e;
    logic [31:0] par;
    logic [15:0] lo [], hi [];
    e[0] = {4'hA, bx, 4'hA, bx};
    e[1] = err;
    par = '0;
    for (int r = 0; r < 32; r++) begin
      e[2 + r] = rows[r];
      par ^= rows[r];
    end
    e[34] = par;
    lo = new[35];
    hi = new[35];
    for (int w = 0; w < 35; w++) begin
      lo[w] = e[w][15:0];
      hi[w] = e[w][31:16];
    end
    e[35] = {ref_crc(hi, 35), ref_crc(lo, 35)};
    return e;
  endfunction

endpackage
