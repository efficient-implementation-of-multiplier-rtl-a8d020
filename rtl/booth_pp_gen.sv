// Partial product generator of the radix-4 Booth multiplier.
//
// Chooses one of 0, MD, -MD, 2MD or -2MD under the control word of a Booth
// encoder and sign-extends it to N+2 bits, the width that holds the full
// range -2^N .. +2^N of a radix-4 partial product. MD and -MD arrive ready
// made (-MD from the two's complement generator), so the generator is only
// a multiplexer plus a one-bit left shift for the doubled cases.
// Shifting the partial product to its column (2i) is left to the multiplier.
// Purely combinational.
//
// Ports: md (N bits, signed), neg_md (N+1 bits, signed, = -md),
//        ctrl (encoder controls), pp (N+2 bits, signed partial product).
module booth_pp_gen
  import fir_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]  md,
  input  logic [N:0]    neg_md,
  input  booth_ctrl_t   ctrl,
  output logic [N+1:0]  pp
);

  logic [N+1:0] chosen;  // +MD or -MD, sign-extended to N+2 bits

  always_comb begin
    chosen = ctrl.neg ? {neg_md[N], neg_md} : {{2{md[N-1]}}, md};
    if (ctrl.x)      pp = chosen;
    else if (ctrl.z) pp = {chosen[N:0], 1'b0};
    else             pp = '0;
  end

endmodule : booth_pp_gen
