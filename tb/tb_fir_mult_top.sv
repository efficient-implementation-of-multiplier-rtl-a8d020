// End-to-end testbench for fir_mult_top at its default parameters (16-bit
// operands, 8 taps), also used as the full-size test.
//
// The filter runs a low-pass-like set of tap weights chosen so that every
// radix-4 Booth digit (-2, -1, 0, +1, +2) occurs in the recoded weights,
// then random weights, on random samples with idle cycles between some of
// them. Meanwhile the shift-and-add and radix-2 Booth multipliers compute
// back-to-back products, with extra start pulses while they are busy. All
// results are compared with values computed here. The testbench counts how
// often each mechanism occurred (each Booth digit value, idle filter cycles,
// ignored start pulses, each radix-2 bit-pair action) and counts a failure
// for any that never did.
module tb_fir_mult_top;
  import fir_pkg::*;
  localparam int unsigned N    = MULT_W;
  localparam int unsigned TAPS = FIR_TAPS;
  localparam int unsigned OW   = 2 * N + $clog2(TAPS);

  logic clk = 0, rst_n = 0;
  logic                  fir_in_valid = 0;
  logic signed [N-1:0]   fir_x = '0;
  logic signed [N-1:0]   fir_coef [TAPS];
  logic                  fir_out_valid;
  logic signed [OW-1:0]  fir_y;
  logic                  sa_start = 0, sa_busy, sa_done;
  logic [N-1:0]          sa_a = '0, sa_b = '0;
  logic [2*N-1:0]        sa_product;
  logic                  r2_start = 0, r2_busy, r2_done;
  logic signed [N-1:0]   r2_a = '0, r2_b = '0;
  logic signed [2*N-1:0] r2_product;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_digit [5];  // Booth digits -2..+2 seen in the filter's weights
  int n_idle = 0, n_fir = 0, n_sa = 0, n_r2 = 0, n_ignored = 0;
  int n_pair [4];   // radix-2 bit pairs 00, 01, 10, 11
  bit fir_done = 0;

  fir_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the radix-4 digits a tap weight recodes into
  function automatic void count_digits(input logic [N-1:0] w);
    logic [N:0] e;
    e = {w, 1'b0};
    for (int i = 0; i < N; i += 2) begin
      case (e[i +: 3])
        3'b000, 3'b111: n_digit[2]++;
        3'b001, 3'b010: n_digit[3]++;
        3'b011:         n_digit[4]++;
        3'b100:         n_digit[0]++;
        default:        n_digit[1]++;
      endcase
    end
  endfunction

  // ---------------- FIR filter ----------------
  longint prods [TAPS][TAPS];

  task automatic fir_step(input logic v, input logic signed [N-1:0] x);
    longint expected;
    fir_in_valid = v;
    fir_x        = x;
    if (v) begin
      for (int j = TAPS - 1; j > 0; j--) prods[j] = prods[j-1];
      for (int k = 0; k < TAPS; k++) prods[0][k] = longint'(fir_coef[k]) * longint'(x);
    end else n_idle++;
    expected = 0;
    for (int j = 0; j < TAPS; j++) expected += prods[j][j];
    @(posedge clk);
    #1;
    checks++;
    if (fir_out_valid !== v || (v && longint'(fir_y) != expected)) begin
      failures++;
      if (failures < 10) $display("FAIL fir valid=%b y=%0d expected %0d", fir_out_valid, fir_y, expected);
    end
    if (v) n_fir++;
  endtask

  initial begin : fir_stim
    // symmetric low-pass-like weights (Q1.15); chosen to contain all digits
    static logic signed [N-1:0] lp [TAPS] = '{16'sh0312, 16'shF9A7, 16'sh1C6B, 16'sh4E3D,
                                       16'sh4E3D, 16'sh1C6B, 16'shF9A7, 16'sh0312};
    foreach (prods[j, k]) prods[j][k] = 0;
    foreach (n_digit[i]) n_digit[i] = 0;
    fir_coef = lp;
    foreach (fir_coef[k]) count_digits(fir_coef[k]);
    wait (rst_n);
    for (int t = 0; t < 400; t++) fir_step(($urandom % 5) != 0, N'($urandom));
    foreach (fir_coef[k]) begin
      fir_coef[k] = N'($urandom);
      count_digits(fir_coef[k]);
    end
    for (int t = 0; t < 400; t++) fir_step(($urandom % 5) != 0, N'($urandom));
    fir_in_valid = 0;
    fir_done = 1;
  end

  // ---------------- sequential multipliers ----------------
  task automatic sa_run(input logic [N-1:0] x, input logic [N-1:0] y);
    longint expv;
    int cycles;
    expv = longint'(x) * longint'(y);
    sa_a = x;
    sa_b = y;
    sa_start = 1;
    @(posedge clk);
    #1 cycles = 1;
    sa_a = ~x;  // ignored: the unit is busy
    while (!sa_done && cycles < 4 * N) begin
      if (cycles == 3) n_ignored++;  // start is still high here
      @(posedge clk);
      #1 cycles++;
      if (cycles == 4) sa_start = 0;
    end
    sa_start = 0;
    checks += 2;
    if (cycles != N) begin
      failures++;
      $display("FAIL shift-add latency %0d", cycles);
    end
    if (longint'(sa_product) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL shift-add %0d * %0d = %0d", x, y, sa_product);
    end
    n_sa++;
  endtask

  task automatic r2_run(input logic signed [N-1:0] x, input logic signed [N-1:0] y);
    longint expv;
    int cycles;
    logic [N:0] e;
    e = {y, 1'b0};
    for (int i = 0; i < N; i++) n_pair[e[i +: 2]]++;
    expv = longint'(x) * longint'(y);
    r2_a = x;
    r2_b = y;
    r2_start = 1;
    @(posedge clk);
    #1 cycles = 1;
    r2_start = 0;
    while (!r2_done && cycles < 4 * N) begin
      @(posedge clk);
      #1 cycles++;
    end
    checks += 2;
    if (cycles != N) begin
      failures++;
      $display("FAIL radix-2 latency %0d", cycles);
    end
    if (longint'(r2_product) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL radix-2 %0d * %0d = %0d", x, y, r2_product);
    end
    n_r2++;
  endtask

  initial begin : mult_stim
    foreach (n_pair[i]) n_pair[i] = 0;
    wait (rst_n);
    @(posedge clk);
    #1;
    // the operands of Figs. 4 and 5 style: small values, then random ones
    sa_run(16'd8, 16'd8);
    sa_run(16'd8, 16'd16);
    r2_run(16'sd12, 16'sd8);
    r2_run(-16'sd12, 16'sd8);
    for (int t = 0; t < 40; t++) begin
      sa_run(N'($urandom), N'($urandom));
      r2_run(N'($urandom), N'($urandom));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (fir_done && n_r2 >= 42);
    repeat (2) @(posedge clk);
    $display("mechanisms: digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, fir samples %0d, idle %0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_fir, n_idle);
    $display("            shift-add %0d (ignored starts %0d), radix-2 %0d, pairs 00:%0d 01:%0d 10:%0d 11:%0d",
             n_sa, n_ignored, n_r2, n_pair[0], n_pair[1], n_pair[2], n_pair[3]);
    foreach (n_digit[i]) begin
      checks++;
      if (n_digit[i] == 0) begin failures++; $display("FAIL Booth digit %0d never used", i - 2); end
    end
    foreach (n_pair[i]) begin
      checks++;
      if (n_pair[i] == 0) begin failures++; $display("FAIL radix-2 pair %0d never used", i); end
    end
    checks += 3;
    if (n_idle == 0)    begin failures++; $display("FAIL no idle filter cycle"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_sa == 0 || n_fir == 0) begin failures++; $display("FAIL a unit never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
