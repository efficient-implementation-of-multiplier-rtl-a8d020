// Top level: FIR filter with radix-4 Booth multipliers, plus the two simpler
// multipliers it is measured against.
//
// fir_transposed is the main datapath: an L-tap transposed-form FIR whose
// tap multipliers are combinational radix-4 (modified) Booth multipliers.
// Beside it, with ports of their own and no connection to the filter, stand
// the sequential 16x16 shift-and-add multiplier and the sequential radix-2
// Booth multiplier, so that all three multiplication schemes are available
// in one design. Sharing clk and rst_n is the only link between them.
//
// Ports: fir_* as fir_transposed (one sample per clock, latency 1);
//        sa_* as shift_add_mult and r2_* as booth_r2_mult (N clocks each).
module fir_mult_top
  import fir_pkg::*;
#(
  parameter int unsigned N    = MULT_W,
  parameter int unsigned TAPS = FIR_TAPS,
  localparam int unsigned OW  = 2 * N + $clog2(TAPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // FIR filter
  input  logic                  fir_in_valid,
  input  logic signed [N-1:0]   fir_x,
  input  logic signed [N-1:0]   fir_coef [TAPS],
  output logic                  fir_out_valid,
  output logic signed [OW-1:0]  fir_y,
  // shift-and-add multiplier (unsigned)
  input  logic                  sa_start,
  input  logic [N-1:0]          sa_a,
  input  logic [N-1:0]          sa_b,
  output logic                  sa_busy,
  output logic                  sa_done,
  output logic [2*N-1:0]        sa_product,
  // radix-2 Booth multiplier (signed)
  input  logic                  r2_start,
  input  logic signed [N-1:0]   r2_a,
  input  logic signed [N-1:0]   r2_b,
  output logic                  r2_busy,
  output logic                  r2_done,
  output logic signed [2*N-1:0] r2_product
);

  fir_transposed #(.N(N), .TAPS(TAPS)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .coef     (fir_coef),
    .out_valid(fir_out_valid),
    .y_out    (fir_y)
  );

  shift_add_mult #(.N(N)) u_shift_add (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (sa_start),
    .a      (sa_a),
    .b      (sa_b),
    .busy   (sa_busy),
    .done   (sa_done),
    .product(sa_product)
  );

  booth_r2_mult #(.N(N)) u_booth_r2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (r2_start),
    .a      (r2_a),
    .b      (r2_b),
    .busy   (r2_busy),
    .done   (r2_done),
    .product(r2_product)
  );

endmodule : fir_mult_top
