// Self-checking testbench for booth_r4_encoder: all eight triplets are
// decoded and the digit they encode (sign, |1|, |2|) is checked against the
// radix-4 selection table written out here.
module tb_booth_r4_encoder;
  import fir_pkg::*;
  logic [2:0]  triplet;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;
  // expected digit of each triplet 000..111
  int digit [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_r4_encoder dut (.triplet(triplet), .ctrl(ctrl));

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int got;
      triplet = 3'(t);
      #1;
      got = ctrl.x ? 1 : ctrl.z ? 2 : 0;
      if (ctrl.neg) got = -got;
      checks++;
      if (got != digit[t] || (ctrl.x && ctrl.z) || (ctrl.neg && !(ctrl.x || ctrl.z))) begin
        failures++;
        $display("FAIL triplet=%b ctrl=%p expected %0d", triplet, ctrl, digit[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
