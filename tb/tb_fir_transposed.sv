// Self-checking testbench for fir_transposed at its defaults (16-bit data
// and tap weights, 8 taps). A reference model keeps the last L accepted
// samples and forms y[n] = sum f[k] x[n-k] directly (with the weights each
// sample met on entry, which is how the transposed form treats a change of
// weights). Stimulus: an impulse
// (the output must replay the tap weights), full-scale samples and weights
// (largest magnitudes, checks that nothing overflows), then random samples
// with random idle cycles. Checked every clock: out_valid is in_valid
// delayed by exactly one clock, and y_out matches the model.
module tb_fir_transposed;
  localparam int unsigned N    = 16;
  localparam int unsigned TAPS = 8;
  localparam int unsigned OW   = 2 * N + $clog2(TAPS);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [N-1:0]  x_in = '0;
  logic signed [N-1:0]  coef [TAPS];
  logic                 out_valid;
  logic signed [OW-1:0] y_out;
  int checks = 0, failures = 0;

  // prods[j][k] = f[k] * x[n-j], with the weights in force when sample x[n-j]
  // entered: the transposed form applies a weight change sample by sample
  longint prods [TAPS][TAPS];
  longint expected;
  logic   exp_valid;

  fir_transposed dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .coef(coef),
    .out_valid(out_valid), .y_out(y_out)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: present (v, x), then check the registered result
  task automatic step(input logic v, input logic signed [N-1:0] x);
    in_valid = v;
    x_in     = x;
    if (v) begin
      for (int j = TAPS - 1; j > 0; j--) prods[j] = prods[j-1];
      for (int k = 0; k < TAPS; k++) prods[0][k] = longint'(coef[k]) * longint'(x);
      expected = 0;
      for (int j = 0; j < TAPS; j++) expected += prods[j][j];
    end
    exp_valid = v;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== exp_valid || (v && longint'(y_out) != expected)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t out_valid=%b y=%0d expected valid=%b y=%0d",
                 $time, out_valid, y_out, exp_valid, expected);
    end
  endtask

  task automatic flush();
    for (int k = 0; k < TAPS; k++) step(1'b1, '0);
  endtask

  initial begin
    foreach (prods[j, k]) prods[j][k] = 0;
    foreach (coef[k]) coef[k] = N'(k * 1000 - 3001);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // impulse response
    step(1'b1, 16'sd1);
    for (int k = 0; k < TAPS + 2; k++) step(1'b1, '0);
    // full-scale: all weights and samples most negative
    foreach (coef[k]) coef[k] = -16'sd32768;
    for (int k = 0; k < TAPS + 2; k++) step(1'b1, -16'sd32768);
    foreach (coef[k]) coef[k] = 16'sd32767;
    flush();
    for (int k = 0; k < TAPS + 2; k++) step(1'b1, -16'sd32768);
    // random weights, random samples, idle cycles
    for (int r = 0; r < 5; r++) begin
      foreach (coef[k]) coef[k] = N'($urandom);
      flush();
      for (int t = 0; t < 500; t++) step(($urandom % 4) != 0, N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
