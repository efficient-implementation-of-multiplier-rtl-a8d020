// Radix-4 (modified) Booth encoder for one multiplier triplet.
//
// The multiplier, with a 0 appended below its LSB, is cut into overlapping
// 3-bit groups {y[2i+1], y[2i], y[2i-1]}. Each group stands for one signed
// digit in {-2,-1,0,+1,+2}:
//   000 0   001 +M   010 +M   011 +2M   100 -2M   101 -M   110 -M   111 0
// The digit is given as three control lines (see fir_pkg::booth_ctrl_t):
// x for |digit| = 1, z for |digit| = 2 and neg for a negative digit.
// Purely combinational.
module booth_r4_encoder
  import fir_pkg::*;
(
  input  logic [2:0]  triplet,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_ctrl_t ctrl
);

  always_comb begin
    ctrl.x   = triplet[1] ^ triplet[0];
    ctrl.z   = (triplet == 3'b011) || (triplet == 3'b100);
    // 111 is a zero digit, so it is never marked negative
    ctrl.neg = triplet[2] & ~(triplet[1] & triplet[0]);
  end

endmodule : booth_r4_encoder
