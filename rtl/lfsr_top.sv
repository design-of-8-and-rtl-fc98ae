// lfsr_top: the 8-bit and the 16-bit maximum-length LFSR side by side.
//
// The two generators are independent designs that share only the clock. Each
// has its own start (synchronous seed load), seed, parallel state and serial
// PN output. The 8-bit generator repeats every 255 clocks, the 16-bit one
// every 65535 clocks.
//
// Interface
//   clk              common rising-edge clock
//   start8,  seed8   load control and seed of the 8-bit generator
//   q8,      pn8     its state (q8[7] = X8) and serial output
//   start16, seed16  load control and seed of the 16-bit generator
//   q16,     pn16    its state (q16[15] = X16) and serial output
// Timing: each generator produces one state per clock after its start falls.
//
// Putting both generators in one top with a shared clock is this
// implementation's choice; the design treats them as two separate circuits.
module lfsr_top
  import lfsr_pkg::*;
(
  input  logic               clk,
  input  logic               start8,
  input  logic [WIDTH8-1:0]  seed8,
  output logic [WIDTH8-1:0]  q8,
  output logic               pn8,
  input  logic               start16,
  input  logic [WIDTH16-1:0] seed16,
  output logic [WIDTH16-1:0] q16,
  output logic               pn16
);

  lfsr8 u_lfsr8 (
    .clk   (clk),
    .start (start8),
    .seed  (seed8),
    .q     (q8),
    .pn    (pn8)
  );

  lfsr16 u_lfsr16 (
    .clk   (clk),
    .start (start16),
    .seed  (seed16),
    .q     (q16),
    .pn    (pn16)
  );

endmodule
