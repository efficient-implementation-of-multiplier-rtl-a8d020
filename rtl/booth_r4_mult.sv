// Signed N x N radix-4 modified Booth multiplier.
//
// Structure, from operand to product:
//   * a two's complement generator forms -MD from the multiplicand MD;
//   * the multiplier MR, with a 0 appended below its LSB (and its sign bit
//     repeated once when N is odd), is cut into NPP = ceil(N/2) overlapping
//     triplets, each decoded by a Booth encoder into a digit in {-2..+2};
//   * one partial-product generator per digit picks 0, +-MD or +-2MD;
//   * each partial product is sign-extended to 2N bits and shifted 2i places;
//   * a carry-save array reduces the NPP partial products to a sum and a
//     carry vector, and one carry-propagate addition gives the product.
// For N = 16 this is 8 partial products instead of 16. The four blocks
// follow the design; the linear carry-save array and the final adder (written
// as a plain `+`, left to synthesis) are this implementation's choices.
// Purely combinational.
//
// Ports: md (multiplicand), mr (multiplier), both N-bit two's complement;
//        prod, 2N-bit two's complement product md * mr.
module booth_r4_mult
  import fir_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   md,
  input  logic [N-1:0]   mr,
  output logic [2*N-1:0] prod
);

  localparam int unsigned NPP = (N + 1) / 2;  // number of partial products
  localparam int unsigned W   = 2 * N;        // product width

  if (N < 4) begin : g_bad_n
    $error("booth_r4_mult needs N >= 4");
  end

  logic [N:0]         neg_md;
  logic [2*NPP:0]     mr_ext;    // {sign extension, mr, 1'b0}
  booth_ctrl_t        ctrl [NPP];
  logic [N+1:0]       pp   [NPP];
  logic [W-1:0]       ops  [NPP];
  logic [W-1:0]       cs_sum, cs_carry;

  twos_comp_gen #(.N(N)) u_neg (
    .md    (md),
    .neg_md(neg_md)
  );

  // appended zero below the LSB; sign repeated once if N is odd
  assign mr_ext = {{(2*NPP - N){mr[N-1]}}, mr, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_digit
    booth_r4_encoder u_enc (
      .triplet(mr_ext[2*i +: 3]),
      .ctrl   (ctrl[i])
    );

    booth_pp_gen #(.N(N)) u_pp (
      .md    (md),
      .neg_md(neg_md),
      .ctrl  (ctrl[i]),
      .pp    (pp[i])
    );

    // sign-extend to the product width, then move to column 2i
    logic [W-1:0] pp_ext;
    assign pp_ext = {{(W - N - 2){pp[i][N+1]}}, pp[i]};
    assign ops[i] = pp_ext << (2 * i);
  end

  csa_tree #(.W(W), .M(NPP)) u_csa (
    .ops  (ops),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  // final carry-propagate addition
  assign prod = cs_sum + cs_carry;

endmodule : booth_r4_mult
