// tb_lfsr8: self-checking testbench for the 8-bit LFSR (x^8+x^6+x^5+x^4+1).
//
// A reference model keeps the eight stages X1..X8 as separate bits and applies
// the feedback X1 <= X8 ^ X6 ^ X5 ^ X4 written out by hand. The testbench
//   - loads seeds with start and checks the parallel load,
//   - compares q and pn with the model on every clock (one state per clock),
//   - checks that an all-ones seed reaches 8'b00011100 after 33 shifts,
//   - checks the period is exactly 255 and that every non-zero state occurs
//     once per period, for several seeds,
//   - reloads a seed in the middle of a run.
// Inputs change on the falling clock edge; outputs are sampled there too.
module tb_lfsr8;
  localparam int N      = 8;
  localparam int PERIOD = 255;

  logic         clk = 1'b0;
  logic         start;
  logic [N-1:0] seed;
  logic [N-1:0] q;
  logic         pn;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  lfsr8 dut (.clk(clk), .start(start), .seed(seed), .q(q), .pn(pn));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Reference model: x[k] is stage Xk.
  bit x [1:N];

  function automatic logic [N-1:0] model_q();
    logic [N-1:0] v;
    for (int k = 1; k <= N; k++) v[k-1] = x[k];
    return v;
  endfunction

  task automatic model_load(input logic [N-1:0] s);
    for (int k = 1; k <= N; k++) x[k] = s[k-1];
  endtask

  task automatic model_step();
    bit fb;
    fb = x[8] ^ x[6] ^ x[5] ^ x[4];
    for (int k = N; k > 1; k--) x[k] = x[k-1];
    x[1] = fb;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s (q=%b model=%b)", cycles, what, q, model_q());
    end
  endtask

  // Hold start for one clock to load s.
  task automatic load(input logic [N-1:0] s);
    @(negedge clk);
    start = 1'b1;
    seed  = s;
    model_load(s);
    @(negedge clk);
    start = 1'b0;
    check(q == s, "seed loaded");
    check(pn == s[N-1], "pn is the last stage after load");
  endtask

  // Shift n times, comparing with the model after each clock.
  task automatic shift(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      model_step();
      check(q == model_q(), "state matches model");
      check(pn == q[N-1], "pn is stage X8");
    end
  endtask

  // Run one full period from s: distinct non-zero states, back at s after 255.
  task automatic full_period(input logic [N-1:0] s);
    bit seen [0:(1<<N)-1];
    int first_repeat;
    foreach (seen[i]) seen[i] = 1'b0;
    load(s);
    seen[s] = 1'b1;
    first_repeat = -1;
    for (int i = 1; i <= PERIOD; i++) begin
      shift(1);
      if (q == s && first_repeat < 0) first_repeat = i;
      if (i < PERIOD) begin
        check(q != '0, "never all-zero");
        check(!seen[q], "no state repeats within a period");
        seen[q] = 1'b1;
      end
    end
    check(first_repeat == PERIOD, $sformatf("period is 255 (got %0d)", first_repeat));
  endtask

  initial begin
    start = 1'b0;
    seed  = '0;

    // All-ones seed: the state printed for this seed after 33 shifts.
    load('1);
    shift(33);
    check(q == 8'b0001_1100, "all-ones seed gives 00011100 after 33 shifts");

    // Reload in the middle of a run.
    shift(17);
    load(8'h01);
    shift(40);

    full_period(8'hFF);
    full_period(8'h01);
    full_period(8'h80);
    for (int r = 0; r < 3; r++) begin
      logic [N-1:0] s;
      s = N'($urandom_range(1, PERIOD));
      full_period(s);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
