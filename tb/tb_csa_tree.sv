// Self-checking testbench for csa_tree: random operand sets (plus all-ones
// sets that make every full adder carry) for an 8-operand and a 3-operand
// array; sum + carry must equal the plain sum of the operands mod 2^W.
module tb_csa_tree;
  localparam int unsigned W = 32;
  logic [W-1:0] ops8 [8];
  logic [W-1:0] ops3 [3];
  logic [W-1:0] s8, c8, s3, c3;
  int checks = 0, failures = 0;

  csa_tree #(.W(W), .M(8)) dut8 (.ops(ops8), .sum(s8), .carry(c8));
  csa_tree #(.W(W), .M(3)) dut3 (.ops(ops3), .sum(s3), .carry(c3));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] e8, e3;
      e8 = '0;
      e3 = '0;
      for (int i = 0; i < 8; i++) begin
        ops8[i] = (t < 10) ? '1 : $urandom;
        e8 += ops8[i];
      end
      for (int i = 0; i < 3; i++) begin
        ops3[i] = (t < 10) ? '1 : $urandom;
        e3 += ops3[i];
      end
      #1;
      checks += 2;
      if (s8 + c8 != e8) begin
        failures++;
        if (failures < 10) $display("FAIL M=8 got %h expected %h", s8 + c8, e8);
      end
      if (s3 + c3 != e3) begin
        failures++;
        if (failures < 10) $display("FAIL M=3 got %h expected %h", s3 + c3, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
