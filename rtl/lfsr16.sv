// lfsr16: 16-bit maximum-length LFSR, polynomial x^16 + x^15 + x^13 + x^4 + 1.
//
// Sixteen stages X1..X16 shift toward X16 on each rising clock edge; X1 takes
// X16 ^ X15 ^ X13 ^ X4, and X16 is the serial PN output. From any non-zero
// seed the register visits all 65535 non-zero states, one per clock, then
// repeats.
//
// Interface
//   clk    rising-edge clock
//   start  synchronous seed load (q <= seed while high)
//   seed   16-bit seed, bit k-1 = stage Xk
//   q      16-bit state, bit k-1 = stage Xk (q[15] = X16)
//   pn     serial output X16
// Timing: one state per clock after start falls; period 65535 clocks.
//
// The polynomial, the stage order, the port names of the signals (clock,
// start, seed, state) and the taps follow the design. The synchronous load,
// the mapping of X1 to bit 0 and the lack of a reset are this implementation's
// choices; with X1 in bit 0 an all-ones seed reaches 16'b1011010110101011
// after 71 shifts. The feedback is built in lfsr_fib.
module lfsr16
  import lfsr_pkg::*;
(
  input  logic               clk,
  input  logic               start,
  input  logic [WIDTH16-1:0] seed,
  output logic [WIDTH16-1:0] q,
  output logic               pn
);

  lfsr_fib #(
    .WIDTH (WIDTH16),
    .TAPS  (TAPS16)
  ) u_lfsr (
    .clk   (clk),
    .start (start),
    .seed  (seed),
    .q     (q),
    .pn    (pn)
  );

endmodule
