// One row of 3:2 carry-save adders (full adders side by side).
//
// Adds three W-bit vectors into a sum vector and a carry vector, with no
// carry propagating along the row: a + b + c == sum + carry (mod 2^W).
// The carry vector is already shifted one place left; the carry out of the
// top bit is dropped, which is exact in modulo-2^W arithmetic.
// Purely combinational. Used by csa_tree.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], 1'b0};

endmodule : csa_row
