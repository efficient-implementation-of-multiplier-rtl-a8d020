// Worked examples at the operand widths used in the classic illustrations of
// these multipliers: a 4x4 shift-and-add product (8 * 8 = 64), an 8x8 radix-2
// Booth product (12 * 8 = 96, and -12 * 8 = -96), and the same pairs through
// the 16x16 radix-4 Booth multiplier. Each sequential product must take
// exactly N clocks. Expected values are written out by hand.
module tb_figure_examples;
  logic clk = 0, rst_n = 0;
  logic        sa_start = 0, sa_busy, sa_done;
  logic [3:0]  sa_a = '0, sa_b = '0;
  logic [7:0]  sa_p;
  logic        r2_start = 0, r2_busy, r2_done;
  logic signed [7:0]  r2_a = '0, r2_b = '0;
  logic signed [15:0] r2_p;
  logic signed [15:0] r4_a, r4_b;
  logic signed [31:0] r4_p;
  int checks = 0, failures = 0;

  shift_add_mult #(.N(4)) u_sa (.clk(clk), .rst_n(rst_n), .start(sa_start), .a(sa_a), .b(sa_b),
                                .busy(sa_busy), .done(sa_done), .product(sa_p));
  booth_r2_mult  #(.N(8)) u_r2 (.clk(clk), .rst_n(rst_n), .start(r2_start), .a(r2_a), .b(r2_b),
                                .busy(r2_busy), .done(r2_done), .product(r2_p));
  booth_r4_mult  #(.N(16)) u_r4 (.md(r4_a), .mr(r4_b), .prod(r4_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic sa(input logic [3:0] x, input logic [3:0] y, input int want);
    int cycles = 1;
    sa_a = x;
    sa_b = y;
    sa_start = 1;
    @(posedge clk);
    #1 sa_start = 0;
    while (!sa_done && cycles < 20) begin
      @(posedge clk);
      #1 cycles++;
    end
    expect_eq("shift-add latency", cycles, 4);
    expect_eq("shift-add product", longint'(sa_p), want);
  endtask

  task automatic r2(input logic signed [7:0] x, input logic signed [7:0] y, input int want);
    int cycles = 1;
    r2_a = x;
    r2_b = y;
    r2_start = 1;
    @(posedge clk);
    #1 r2_start = 0;
    while (!r2_done && cycles < 20) begin
      @(posedge clk);
      #1 cycles++;
    end
    expect_eq("radix-2 latency", cycles, 8);
    expect_eq("radix-2 product", longint'(r2_p), want);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sa(4'd8, 4'd8, 64);
    sa(4'd15, 4'd15, 225);
    r2(8'sd12, 8'sd8, 96);
    r2(-8'sd12, 8'sd8, -96);
    r2(-8'sd128, -8'sd128, 16384);
    r4_a = 16'sd12;  r4_b = 16'sd8;  #1 expect_eq("radix-4 12*8", longint'(r4_p), 96);
    r4_a = -16'sd12; r4_b = 16'sd8;  #1 expect_eq("radix-4 -12*8", longint'(r4_p), -96);
    r4_a = 16'sd8;   r4_b = 16'sd8;  #1 expect_eq("radix-4 8*8", longint'(r4_p), 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
