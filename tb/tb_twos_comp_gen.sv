// Self-checking testbench for twos_comp_gen: every 16-bit input, including
// the most negative one, is negated and compared with -md computed here.
module tb_twos_comp_gen;
  localparam int unsigned N = 16;
  logic [N-1:0] md;
  logic [N:0]   neg_md;
  int checks = 0, failures = 0;

  twos_comp_gen #(.N(N)) dut (.md(md), .neg_md(neg_md));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      md = N'(v);
      #1;
      checks++;
      if ($signed(neg_md) != -$signed({md[N-1], md})) begin
        failures++;
        if (failures < 10) $display("FAIL md=%h neg_md=%h", md, neg_md);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
