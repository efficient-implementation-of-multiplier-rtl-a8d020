// Shared types and default sizes for the Booth-multiplier FIR filter.
//
// booth_ctrl_t is the control word one radix-4 Booth encoder hands to one
// partial-product generator: `x` selects the multiplicand itself (|digit| = 1),
// `z` selects twice the multiplicand (|digit| = 2) and `neg` selects the
// negated multiplicand. With x = z = 0 the partial product is zero.
// The defaults (16-bit operands) follow the 16x16 multipliers of the design;
// the tap count is this design's own choice, since no filter length is fixed.
package fir_pkg;

  // Operand width of every multiplier (16x16 multiplication).
  localparam int unsigned MULT_W = 16;

  // Number of filter taps (filter length L). Design choice.
  localparam int unsigned FIR_TAPS = 8;

  typedef struct packed {
    logic neg;  // digit is negative: take -MD
    logic x;    // |digit| == 1: take MD
    logic z;    // |digit| == 2: take 2*MD
  } booth_ctrl_t;

endpackage : fir_pkg
