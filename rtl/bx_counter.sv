// Bunch crossing counter.
//
// Counts the 40 MHz bunch crossings from 0 to ORBIT-1 and wraps to zero, so
// that the ID repeats every ORBIT crossings (3563 per LHC turn, as in the
// document). A bunch counter reset (bcr) from the TTC short broadcast forces
// the count to zero on the next enabled clock, keeping the local count in step
// with the machine. Used in the PInt, where the count is the event header,
// and in the Level-1 controller, where it is compared with that header.
//
// Interface: ce is the bunch crossing enable (tie high on a 40 MHz clock).
// Timing: bxid changes one clock after an enabled edge; one count per ce.
module bx_counter #(
  parameter int unsigned W     = 12,
  parameter int unsigned ORBIT = 3563
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         bcr,
  output logic [W-1:0] bxid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         bxid <= '0;
    else if (ce) begin
      if (bcr || bxid == W'(ORBIT - 1)) bxid <= '0;
      else                              bxid <= bxid + 1'b1;
    end
  end
endmodule
