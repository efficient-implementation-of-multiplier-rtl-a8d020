// Two's complement generator of the radix-4 Booth multiplier.
//
// Produces -MD from the signed multiplicand MD in the classic way: every bit
// of MD is inverted and 1 is added through an explicit ripple-carry chain of
// half adders. The output is one bit wider than the input so that the
// negation of the most negative input (-2^(N-1)) is still representable.
// Purely combinational; the ripple structure is as the design describes, the
// one-bit-wider output is this implementation's choice.
//
// Ports: md (N bits, signed), neg_md (N+1 bits, signed) = -md.
module twos_comp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] md,
  output logic [N:0]   neg_md
);

  logic [N:0] inv;     // inverted, sign-extended multiplicand
  logic [N:0]   carry; // ripple carry chain, carry[0] is the +1

  assign inv      = ~{md[N-1], md};
  assign carry[0] = 1'b1;

  for (genvar i = 0; i <= N; i++) begin : g_ripple
    // half adder: add the incoming carry to one inverted bit
    assign neg_md[i] = inv[i] ^ carry[i];
    if (i < N) begin : g_carry  // the carry out of the top bit is not needed
      assign carry[i+1] = inv[i] & carry[i];
    end
  end

endmodule : twos_comp_gen
