// lfsr8: 8-bit maximum-length LFSR, polynomial x^8 + x^6 + x^5 + x^4 + 1.
//
// Eight stages X1..X8 shift toward X8 on each rising clock edge; X1 takes
// X8 ^ X6 ^ X5 ^ X4, and X8 is the serial PN output. From any non-zero seed
// the register visits all 255 non-zero states, one per clock, then repeats.
//
// Interface
//   clk    rising-edge clock
//   start  synchronous seed load (q <= seed while high)
//   seed   8-bit seed, bit k-1 = stage Xk
//   q      8-bit state, bit k-1 = stage Xk (q[7] = X8)
//   pn     serial output X8
// Timing: one state per clock after start falls; period 255 clocks.
//
// The polynomial, the stage order, the port names of the signals (clock,
// start, seed, state) and the taps follow the design. The synchronous load,
// the mapping of X1 to bit 0 and the lack of a reset are this implementation's
// choices; with X1 in bit 0 an all-ones seed reaches 8'b00011100 after 33
// shifts. The feedback is built in lfsr_fib.
module lfsr8
  import lfsr_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  input  logic [WIDTH8-1:0] seed,
  output logic [WIDTH8-1:0] q,
  output logic              pn
);

  lfsr_fib #(
    .WIDTH (WIDTH8),
    .TAPS  (TAPS8)
  ) u_lfsr (
    .clk   (clk),
    .start (start),
    .seed  (seed),
    .q     (q),
    .pn    (pn)
  );

endmodule
