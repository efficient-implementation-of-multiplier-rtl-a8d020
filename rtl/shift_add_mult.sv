// Sequential N x N shift-and-add multiplier (unsigned operands).
//
// One multiplier bit is handled per clock. Stage i adds the multiplicand,
// already shifted i places left, to the running product if multiplier bit
// y[i] is 1, and adds 0 otherwise; the multiplicand register then shifts one
// place left and the multiplier register one place right. After N stages the
// running product is the 2N-bit result. The per-stage rule follows the design;
// the start/busy/done handshake and the synchronous active-low reset are this
// implementation's choices.
//
// Ports: start with a (multiplicand) and b (multiplier) starts a product when
//        the unit is idle (start is ignored while busy); busy is high while
//        stages run; done pulses for one clock when product is ready, and
//        product then holds its value until the next start.
// Timing: stage 1 runs on the clock edge that accepts start, stages 2..N on
//         the next N-1 edges; done is high after the N-th edge, so a product
//         takes N clocks (16 for 16x16).
module shift_add_mult #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  logic [2*N-1:0]         mcand;   // multiplicand, shifted left each stage
  logic [N-1:0]           mplier;  // multiplier, shifted right each stage
  logic [$clog2(N+1)-1:0] stage;   // stages still to run

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcand   <= '0;
      mplier  <= '0;
      stage   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      product <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          // stage 1 is done while loading: add a if y[0] is 1
          mcand   <= {{(N-1){1'b0}}, a, 1'b0};
          mplier  <= b >> 1;
          product <= b[0] ? {{N{1'b0}}, a} : '0;
          stage   <= ($clog2(N+1))'(N - 1);
          busy    <= 1'b1;
        end
      end else begin
        // rule a: add the shifted multiplicand; rule b: add 0
        if (mplier[0]) product <= product + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        stage  <= stage - 1'b1;
        if (stage == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule : shift_add_mult
