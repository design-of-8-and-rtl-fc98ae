// lfsr_fib: generic n-stage Fibonacci linear feedback shift register.
//
// WIDTH D flip-flops X1..Xn form one shift chain on a common clock. On every
// rising edge each stage takes the value of the stage before it, and X1 takes
// the exclusive-or of the tapped stages. The output stage Xn is the serial
// pseudo-noise (PN) output. The initial value (the seed) is loaded in parallel
// while `start` is high. With a maximum-length tap set the register steps
// through all 2^n - 1 non-zero states before it repeats.
//
// Interface
//   clk    rising-edge clock
//   start  synchronous load: while high, q <= seed on each clock edge
//   seed   initial value; bit k-1 is stage X(k)
//   q      register state; bit k-1 is stage X(k), so q[WIDTH-1] is Xn
//   pn     serial output, equal to q[WIDTH-1]
// Timing: one new state per clock once start is low; the first shifted state
// appears on the first rising edge at which start is sampled low.
//
// Following the design: the shift-register chain, the XOR feedback into the
// first stage, the output taken from the last stage, the seed, and the rules
// for the tap set (last stage always tapped, an even number of taps, no common
// divisor), which are checked here during elaboration.
// Own choices: `start` loads the seed synchronously; there is no reset, so the
// register holds an arbitrary value until the first load; the all-zero seed,
// which an XOR feedback can never leave, is flagged by an assertion.
module lfsr_fib
  import lfsr_pkg::*;
#(
  parameter int unsigned       WIDTH = WIDTH8,
  parameter logic [WIDTH-1:0]  TAPS  = TAPS8
) (
  input  logic             clk,
  input  logic             start,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] q,
  output logic             pn
);

  // Tap-selection rules, checked while elaborating.
  if (WIDTH < 2 || WIDTH > 64) begin : gen_chk_width
    $error("lfsr_fib: WIDTH must be between 2 and 64");
  end
  if (!TAPS[WIDTH-1]) begin : gen_chk_last
    $error("lfsr_fib: the last stage must be tapped");
  end
  if (tap_count(64'(TAPS), WIDTH) % 2 != 0) begin : gen_chk_even
    $error("lfsr_fib: a maximum-length tap set has an even number of taps");
  end
  if (tap_gcd(64'(TAPS), WIDTH) != 1) begin : gen_chk_gcd
    $error("lfsr_fib: the tap positions must have no common divisor");
  end

  logic feedback;

  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (start) q <= seed;
    else       q <= {q[WIDTH-2:0], feedback};
  end

  assign pn = q[WIDTH-1];

  // An all-zero state is a fixed point of XOR feedback.
  always_ff @(posedge clk)
    if (start) assert (seed != '0) else $error("lfsr_fib: all-zero seed locks the register");

endmodule
