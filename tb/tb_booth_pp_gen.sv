// Self-checking testbench for booth_pp_gen at N = 8: for every multiplicand
// and each of the five digits -2..+2 the partial product must equal
// digit * md. -md is computed here, not by twos_comp_gen.
module tb_booth_pp_gen;
  import fir_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] md;
  logic [N:0]   neg_md;
  booth_ctrl_t  ctrl;
  logic [N+1:0] pp;
  int checks = 0, failures = 0;

  booth_pp_gen #(.N(N)) dut (.md(md), .neg_md(neg_md), .ctrl(ctrl), .pp(pp));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      for (int d = -2; d <= 2; d++) begin
        int m, expv;
        md     = N'(v);
        m      = int'($signed(md));
        neg_md = (N+1)'(-m);
        ctrl.neg = (d < 0);
        ctrl.x   = (d == 1 || d == -1);
        ctrl.z   = (d == 2 || d == -2);
        expv = d * m;
        #1;
        checks++;
        if (int'($signed(pp)) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL md=%0d digit=%0d pp=%0d", m, d, $signed(pp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
