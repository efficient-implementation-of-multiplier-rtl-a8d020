// L-tap FIR filter in transposed form with radix-4 Booth multipliers.
//
// Computes y[n] = sum_{k=0}^{L-1} f[k] * x[n-k]. In the transposed structure
// every tap multiplies the *current* sample x[n] by its tap weight f[k]
// (one booth_r4_mult per tap, the weight taking the Booth-recoded multiplier
// input), and registers sit between the adders:
//   z[L-1] <= f[L-1]*x[n]
//   z[k]   <= f[k]*x[n] + z[k+1]        for 1 <= k < L-1
//   y      <= f[0]*x[n] + z[1]
// so the longest path is one multiplier plus one adder, whatever L is.
// The structure follows the design. The output register, the sample-valid
// qualifier, the run-time coefficient inputs, the synchronous active-low
// reset and the tap count L = 8 are this implementation's choices.
// Adders are full width, so the output (2N + clog2(L) bits) never overflows.
//
// Ports: clk, rst_n; in_valid/x_in: a new sample when in_valid is 1;
//        coef[L]: tap weights f[0..L-1] (hold them steady while filtering);
//        out_valid/y_out: y for the sample that entered one cycle earlier.
// Timing: one sample per clock; latency 1 clock (in_valid -> out_valid).
// Cycles with in_valid = 0 leave the filter state untouched. A change of the
// tap weights takes effect sample by sample: partial sums already in the
// delay registers keep the weights they were formed with.
module fir_transposed
  import fir_pkg::*;
#(
  parameter int unsigned N    = MULT_W,    // sample and coefficient width
  parameter int unsigned TAPS = FIR_TAPS,  // filter length L
  localparam int unsigned OW  = 2 * N + $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [N-1:0] x_in,
  input  logic signed [N-1:0] coef [TAPS],
  output logic                out_valid,
  output logic signed [OW-1:0] y_out
);

  if (TAPS < 2) begin : g_bad_taps
    $error("fir_transposed needs at least two taps");
  end

  logic signed [2*N-1:0] prod [TAPS];  // f[k] * x[n]
  logic signed [OW-1:0]  z    [1:TAPS-1];  // delay registers between adders

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_r4_mult #(.N(N)) u_mult (
      .md  (x_in),
      .mr  (coef[k]),
      .prod(prod[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) z[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z[TAPS-1] <= OW'(prod[TAPS-1]);
        for (int k = 1; k < TAPS - 1; k++) z[k] <= OW'(prod[k]) + z[k+1];
        y_out <= OW'(prod[0]) + z[1];
      end
    end
  end

endmodule : fir_transposed
