// Carry-save accumulation of M operands into one sum and one carry vector.
//
// The operands are added by a linear array of 3:2 carry-save rows: the first
// two operands form the initial (sum, carry) pair and each further operand is
// folded in by one more csa_row. No carry ripples inside the array; the one
// carry-propagate addition (sum + carry) is done by the user. All arithmetic
// is modulo 2^W. A linear array is the plainest carry-save arrangement; the
// arrangement itself is this implementation's choice.
// Purely combinational; M-2 full-adder levels deep.
//
// Ports: ops (M operands of W bits), sum and carry (W bits each),
//        with sum + carry == ops[0] + ... + ops[M-1] (mod 2^W).
module csa_tree #(
  parameter int unsigned W = 32,
  parameter int unsigned M = 8
) (
  input  logic [W-1:0] ops [M],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  if (M < 2) begin : g_bad_m
    $error("csa_tree needs at least two operands");
  end

  // (s[k], c[k]) is the carry-save total of operands 0 .. k+1
  logic [W-1:0] s [M-1];
  logic [W-1:0] c [M-1];

  assign s[0] = ops[0];
  assign c[0] = ops[1];

  for (genvar k = 1; k < M - 1; k++) begin : g_row
    csa_row #(.W(W)) u_row (
      .a    (s[k-1]),
      .b    (c[k-1]),
      .c    (ops[k+1]),
      .sum  (s[k]),
      .carry(c[k])
    );
  end

  assign sum   = s[M-2];
  assign carry = c[M-2];

endmodule : csa_tree
