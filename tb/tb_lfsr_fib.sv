// tb_lfsr_fib: self-checking testbench for the generic Fibonacci LFSR.
//
// Three instances of different sizes run from one clock and one start:
//   3 stages, x^3 + x^2 + 1  (taps X3, X2)   period 7
//   4 stages, x^4 + x^3 + 1  (taps X4, X3)   period 15
//   5 stages, x^5 + x^3 + 1  (taps X5, X3)   period 31
// Each has a reference model whose feedback is written out by hand. The
// testbench checks the seed load, compares every state and the serial output
// with the models on every clock, measures each period from the load and
// checks that it equals 2^n - 1 with every non-zero state visited once.
module tb_lfsr_fib;
  logic clk = 1'b0;
  logic start;
  logic [2:0] seed3;
  logic [3:0] seed4;
  logic [4:0] seed5;
  logic [2:0] q3;
  logic [3:0] q4;
  logic [4:0] q5;
  logic pn3, pn4, pn5;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  lfsr_fib #(.WIDTH(3), .TAPS(3'b110))   dut3 (.clk(clk), .start(start), .seed(seed3), .q(q3), .pn(pn3));
  lfsr_fib #(.WIDTH(4), .TAPS(4'b1100))  dut4 (.clk(clk), .start(start), .seed(seed4), .q(q4), .pn(pn4));
  lfsr_fib #(.WIDTH(5), .TAPS(5'b10100)) dut5 (.clk(clk), .start(start), .seed(seed5), .q(q5), .pn(pn5));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Models: bit k-1 of m<n> is stage Xk; the new X1 is shifted in at bit 0.
  logic [2:0] m3;
  logic [3:0] m4;
  logic [4:0] m5;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s (q3=%b/%b q4=%b/%b q5=%b/%b)",
               cycles, what, q3, m3, q4, m4, q5, m5);
    end
  endtask

  task automatic load(input logic [2:0] s3, input logic [3:0] s4, input logic [4:0] s5);
    @(negedge clk);
    start = 1'b1;
    seed3 = s3; seed4 = s4; seed5 = s5;
    m3 = s3;    m4 = s4;    m5 = s5;
    @(negedge clk);
    start = 1'b0;
    check(q3 == s3 && q4 == s4 && q5 == s5, "seeds loaded");
  endtask

  task automatic step();
    @(negedge clk);
    m3 = {m3[1:0], m3[2] ^ m3[1]};
    m4 = {m4[2:0], m4[3] ^ m4[2]};
    m5 = {m5[3:0], m5[4] ^ m5[2]};
    check(q3 == m3, "3-stage state matches model");
    check(q4 == m4, "4-stage state matches model");
    check(q5 == m5, "5-stage state matches model");
    check(pn3 == q3[2] && pn4 == q4[3] && pn5 == q5[4], "pn is the last stage");
  endtask

  initial begin
    int p3, p4, p5;
    bit seen3 [0:7];
    bit seen4 [0:15];
    bit seen5 [0:31];
    int dup;
    start = 1'b0;
    seed3 = '0; seed4 = '0; seed5 = '0;

    for (int round = 0; round < 4; round++) begin
      logic [2:0] s3;
      logic [3:0] s4;
      logic [4:0] s5;
      case (round)
        0:       begin s3 = 3'b111; s4 = 4'b1111; s5 = 5'b11111; end
        1:       begin s3 = 3'b100; s4 = 4'b1000; s5 = 5'b10000; end
        2:       begin s3 = 3'b010; s4 = 4'b0110; s5 = 5'b01010; end
        default: begin
          s3 = 3'($urandom_range(1, 7));
          s4 = 4'($urandom_range(1, 15));
          s5 = 5'($urandom_range(1, 31));
        end
      endcase
      foreach (seen3[i]) seen3[i] = 1'b0;
      foreach (seen4[i]) seen4[i] = 1'b0;
      foreach (seen5[i]) seen5[i] = 1'b0;
      dup = 0;
      p3 = 0; p4 = 0; p5 = 0;
      load(s3, s4, s5);
      for (int i = 1; i <= 40; i++) begin
        if (seen3[q3] && p3 == 0) dup++;
        if (seen4[q4] && p4 == 0) dup++;
        if (seen5[q5] && p5 == 0) dup++;
        seen3[q3] = 1'b1; seen4[q4] = 1'b1; seen5[q5] = 1'b1;
        step();
        if (q3 == s3 && p3 == 0) p3 = i;
        if (q4 == s4 && p4 == 0) p4 = i;
        if (q5 == s5 && p5 == 0) p5 = i;
      end
      check(p3 == 7,  $sformatf("3-stage period is 7 (got %0d)", p3));
      check(p4 == 15, $sformatf("4-stage period is 15 (got %0d)", p4));
      check(p5 == 31, $sformatf("5-stage period is 31 (got %0d)", p5));
      check(dup == 0, "no state repeats before the period ends");
      check(!seen3[0] && !seen4[0] && !seen5[0], "all-zero state never reached");
    end

    // Reload while running.
    load(3'b001, 4'b0001, 5'b00001);
    repeat (5) step();
    load(3'b110, 4'b1010, 5'b11010);
    repeat (10) step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
