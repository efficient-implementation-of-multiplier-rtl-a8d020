// Self-checking testbench for shift_add_mult (unsigned shift-and-add multiplier, 16x16).
// Corner operands and random pairs are multiplied. For each product the
// testbench checks that done comes exactly N clocks after start, that busy
// is high in between, that a start pulse while busy is ignored, and that the
// product equals the one computed here.
module tb_shift_add_mult;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic  [N-1:0]   a = '0, b = '0;
  logic               busy, done;
  logic  [2*N-1:0] product;
  int checks = 0, failures = 0;

  shift_add_mult #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .product(product)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y);
    longint expv;
    int cycles;
    a = x;
    b = y;
    expv = longint'(unsigned'(a)) * longint'(unsigned'(b));
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 1;
    // a second start while busy, with other operands, must be ignored
    a = ~x;
    b = ~y;
    start = 1'b1;
    while (!done && cycles < 4 * N) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      @(posedge clk);
      #1 start = 1'b0;
      cycles++;
    end
    checks += 2;
    if (cycles != N) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", cycles, N);
    end
    if (longint'(product) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", x, y, product, expv);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    static logic [N-1:0] corner [5] = '{16'h8000, 16'hffff, 16'h0000, 16'h0001, 16'h7fff};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    for (int t = 0; t < 3000; t++) run(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
