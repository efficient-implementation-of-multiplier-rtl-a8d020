// Self-checking testbench for booth_r4_mult. The 16x16 default is checked on
// corner operands (most negative, -1, 0, 1, most positive) and random pairs;
// an 8x8 instance is checked exhaustively and a 7x7 instance (odd width, so
// the multiplier sign is extended by one bit) exhaustively too. Products are
// computed here with the ordinary signed multiply.
module tb_booth_r4_mult;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [6:0]  a7, b7;
  logic signed [13:0] p7;
  int checks = 0, failures = 0;

  booth_r4_mult #(.N(16)) dut16 (.md(a16), .mr(b16), .prod(p16));
  booth_r4_mult #(.N(8))  dut8  (.md(a8),  .mr(b8),  .prod(p8));
  booth_r4_mult #(.N(7))  dut7  (.md(a7),  .mr(b7),  .prod(p7));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic signed [15:0] x, input logic signed [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL16 %0d * %0d = %0d", x, y, p16);
    end
  endtask

  initial begin
    static logic signed [15:0] corner [5] = '{-16'sd32768, -16'sd1, 16'sd0, 16'sd1, 16'sd32767};
    foreach (corner[i]) foreach (corner[j]) check16(corner[i], corner[j]);
    for (int t = 0; t < 20000; t++) check16(16'($urandom), 16'($urandom));
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        checks++;
        if (int'(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d = %0d", x, y, p8);
        end
      end
    for (int x = -64; x < 64; x++)
      for (int y = -64; y < 64; y++) begin
        a7 = 7'(x);
        b7 = 7'(y);
        #1;
        checks++;
        if (int'(p7) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL7 %0d * %0d = %0d", x, y, p7);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
