// Sequential N x N radix-2 Booth multiplier (two's complement operands).
//
// The multiplier y, with a 0 appended below its LSB, is read as N bit pairs
// (y[i], y[i-1]). Each pair selects a partial product from {0, +M, -M}:
//   00 -> 0   01 -> +M   10 -> -M   11 -> 0
// and the partial product of pair i carries weight 2^i. One pair is handled
// per clock: the running product gains the multiplicand (sign-extended to 2N
// bits and shifted i places left), loses it, or is left alone. After N steps
// the running product is the signed 2N-bit result. The selection rule follows
// the design; the start/busy/done handshake and the synchronous active-low
// reset are this implementation's choices.
//
// Ports: start with a (multiplicand) and b (multiplier) starts a product when
//        idle (ignored while busy); busy is high while steps run; done pulses
//        for one clock when product is ready, and product then holds.
// Timing: pair 0 is handled on the clock edge that accepts start, pairs
//         1..N-1 on the next N-1 edges; done is high after the N-th edge,
//         so a product takes N clocks.
module booth_r2_mult #(
  parameter int unsigned N = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] product
);

  logic [2*N-1:0]         mcand;   // sign-extended multiplicand, shifted left each step
  logic [N:0]             mplier;  // bits 1:0 hold the next pair (y[i], y[i-1])
  logic [$clog2(N+1)-1:0] step;    // steps still to run

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcand   <= '0;
      mplier  <= '0;
      step    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      product <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          // pair 0 is (y[0], 0) and is handled while loading: -M if y[0]
          mcand   <= (2*N)'(a) << 1;  // sign-extends
          mplier  <= {b[N-1], b};  // next pair (y[1], y[0]) in bits 1:0
          product <= b[0] ? -(2*N)'(a) : '0;
          step    <= ($clog2(N+1))'(N - 1);
          busy    <= 1'b1;
        end
      end else begin
        unique case (mplier[1:0])
          2'b01:   product <= product + mcand;
          2'b10:   product <= product - mcand;
          default: ;  // 00 and 11 select 0
        endcase
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        step   <= step - 1'b1;
        if (step == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule : booth_r2_mult
