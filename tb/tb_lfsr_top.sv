// tb_lfsr_top: end-to-end testbench of both generators at full size.
//
// Both generators run from one clock. Reference models hold the stages as
// separate bits with the feedback written out by hand:
//   8 bits : X1 <= X8 ^ X6 ^ X5 ^ X4
//   16 bits: X1 <= X16 ^ X15 ^ X13 ^ X4
// The testbench loads all-ones seeds into both and then runs one full 16-bit
// period (65535 clocks), in which the 8-bit generator completes exactly 257
// periods of 255. On every clock it compares both states and serial outputs
// with the models. It checks
//   - the states printed for the all-ones seed: 00011100 after 33 shifts
//     (8 bits) and 1011010110101011 after 71 shifts (16 bits),
//   - the period of each generator and that no state repeats within it,
//   - the balance of each serial output over a period: 2^(n-1) ones and
//     2^(n-1) - 1 zeros,
//   - that reloading one generator leaves the other untouched.
// It counts how often each mechanism occurred (seed load per generator, period
// wrap per generator, reload while the other runs) and fails a mechanism that
// never happened.
module tb_lfsr_top;
  logic        clk = 1'b0;
  logic        start8, start16;
  logic [7:0]  seed8;
  logic [15:0] seed16;
  logic [7:0]  q8;
  logic [15:0] q16;
  logic        pn8, pn16;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  int n_load8 = 0, n_load16 = 0, n_wrap8 = 0, n_wrap16 = 0, n_reload_indep = 0;

  lfsr_top dut (
    .clk     (clk),
    .start8  (start8),  .seed8  (seed8),  .q8  (q8),  .pn8  (pn8),
    .start16 (start16), .seed16 (seed16), .q16 (q16), .pn16 (pn16)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  bit a [1:8];
  bit b [1:16];

  function automatic logic [7:0] ma();
    for (int k = 1; k <= 8; k++) ma[k-1] = a[k];
  endfunction
  function automatic logic [15:0] mb();
    for (int k = 1; k <= 16; k++) mb[k-1] = b[k];
  endfunction

  task automatic step_a();
    bit fb;
    fb = a[8] ^ a[6] ^ a[5] ^ a[4];
    for (int k = 8; k > 1; k--) a[k] = a[k-1];
    a[1] = fb;
  endtask
  task automatic step_b();
    bit fb;
    fb = b[16] ^ b[15] ^ b[13] ^ b[4];
    for (int k = 16; k > 1; k--) b[k] = b[k-1];
    b[1] = fb;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL at cycle %0d: %s (q8=%b/%b q16=%b/%b)", cycles, what, q8, ma(), q16, mb());
    end
  endtask

  task automatic compare();
    check(q8 == ma(), "8-bit state matches model");
    check(q16 == mb(), "16-bit state matches model");
    check(pn8 == a[8], "pn8 is X8");
    check(pn16 == b[16], "pn16 is X16");
  endtask

  initial begin
    bit seen [0:65535];
    int ones8, ones16, since8, p16;
    logic [7:0] s8;
    logic [15:0] s16;

    start8 = 1'b0; start16 = 1'b0; seed8 = '0; seed16 = '0;
    foreach (seen[i]) seen[i] = 1'b0;

    // Load both generators with all-ones seeds.
    s8 = 8'hFF; s16 = 16'hFFFF;
    @(negedge clk);
    start8 = 1'b1; start16 = 1'b1; seed8 = s8; seed16 = s16;
    for (int k = 1; k <= 8; k++)  a[k] = s8[k-1];
    for (int k = 1; k <= 16; k++) b[k] = s16[k-1];
    @(negedge clk);
    start8 = 1'b0; start16 = 1'b0;
    check(q8 == s8 && q16 == s16, "both seeds loaded");
    n_load8++; n_load16++;
    compare();

    // One full 16-bit period.
    seen[q16] = 1'b1;
    ones8 = 0; ones16 = 0; since8 = 0; p16 = 0;
    for (int i = 1; i <= 65535; i++) begin
      // serial outputs counted over the states before each shift
      if (i <= 255) ones8 += int'(pn8);
      ones16 += int'(pn16);
      @(negedge clk);
      step_a(); step_b();
      compare();
      since8++;
      if (q8 == s8) begin
        check(since8 == 255, $sformatf("8-bit period is 255 (got %0d)", since8));
        n_wrap8++;
        since8 = 0;
      end
      if (i == 33) check(q8 == 8'b0001_1100, "8-bit state 00011100 after 33 shifts");
      if (i == 71) check(q16 == 16'b1011_0101_1010_1011, "16-bit state 1011010110101011 after 71 shifts");
      if (q16 == s16 && p16 == 0) p16 = i;
      if (i < 65535) begin
        if (seen[q16]) check(1'b0, "16-bit state repeats within a period");
        seen[q16] = 1'b1;
      end
    end
    check(p16 == 65535, $sformatf("16-bit period is 65535 (got %0d)", p16));
    if (p16 == 65535) n_wrap16++;
    check(!seen[0], "16-bit all-zero state never reached");
    check(n_wrap8 == 257, $sformatf("8-bit generator wrapped 257 times (got %0d)", n_wrap8));
    check(ones8 == 128, $sformatf("pn8 has 128 ones per period (got %0d)", ones8));
    check(ones16 == 32768, $sformatf("pn16 has 32768 ones per period (got %0d)", ones16));

    // Reload the 8-bit generator alone; the 16-bit one keeps running.
    repeat (3) begin
      @(negedge clk); step_a(); step_b(); compare();
    end
    @(negedge clk);
    start8 = 1'b1; seed8 = 8'h5A;
    step_b();
    @(negedge clk);
    start8 = 1'b0;
    for (int k = 1; k <= 8; k++) a[k] = seed8[k-1];
    step_b();
    compare();
    n_load8++; n_reload_indep++;
    repeat (50) begin
      @(negedge clk); step_a(); step_b(); compare();
    end

    // Reload the 16-bit generator alone; the 8-bit one keeps running.
    @(negedge clk);
    start16 = 1'b1; seed16 = 16'h8001;
    step_a();
    @(negedge clk);
    start16 = 1'b0;
    for (int k = 1; k <= 16; k++) b[k] = seed16[k-1];
    step_a();
    compare();
    n_load16++; n_reload_indep++;
    repeat (300) begin
      @(negedge clk); step_a(); step_b(); compare();
    end

    $display("mechanisms: load8=%0d load16=%0d wrap8=%0d wrap16=%0d independent_reload=%0d",
             n_load8, n_load16, n_wrap8, n_wrap16, n_reload_indep);
    check(n_load8 > 0,        "8-bit seed load happened");
    check(n_load16 > 0,       "16-bit seed load happened");
    check(n_wrap8 > 0,        "8-bit period wrap happened");
    check(n_wrap16 > 0,       "16-bit period wrap happened");
    check(n_reload_indep > 0, "independent reload happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
