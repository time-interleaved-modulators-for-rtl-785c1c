// fir_ti -- second-order FIR filter expanded into N parallel time slots.
//
// This is the small example of the expansion method: the transposed FIR
//   u1[n] = a1*x[n]
//   u2[n] = a2*x[n] + u1[n-1]
//   y[n]  = a3*x[n] + u2[n-1]
// is written for the N instants Nn .. Nn+N-1 and each copy ("FIR_1", "FIR_2",
// ...) is built as its own slice. Slice k uses the u1, u2 of slice k-1; slice 0
// uses u1, u2 of the previous clock's last slice, the only values that are
// registered. One clock takes N consecutive inputs and gives N consecutive
// outputs, so the sample rate is N times the clock rate, provided the N slices
// settle within one clock. N = 2 is the two-slice drawing; the coefficients and
// word lengths are not given and are this design's choices.
//
// Interface: x[k] is the input for instant Nn+k, y[k] the output for the same
// instant, combinational from x and the registers (no added latency).
// Synchronous active-low reset clears u1 and u2.
module fir_ti #(
  parameter int N  = 2,    // parallel slices
  parameter int DW = 12,   // input word length
  parameter int CW = 8,    // coefficient word length
  parameter logic signed [CW-1:0] A1 = 8'sd19,
  parameter logic signed [CW-1:0] A2 = -8'sd37,
  parameter logic signed [CW-1:0] A3 = 8'sd53,
  localparam int YW = DW + CW + 1  // holds the sum of two products
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] x [N],
  output logic signed [YW-1:0] y [N]
);

  logic signed [YW-1:0] u1 [N+1];  // u1[k] = u1 of instant Nn+k-1
  logic signed [YW-1:0] u2 [N+1];
  logic signed [YW-1:0] u1_q, u2_q;

  always_comb begin
    u1[0] = u1_q;
    u2[0] = u2_q;
    for (int k = 0; k < N; k++) begin
      u1[k+1] = YW'(A1 * x[k]);
      u2[k+1] = YW'(A2 * x[k]) + u1[k];
      y[k]    = YW'(A3 * x[k]) + u2[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u1_q <= '0;
      u2_q <= '0;
    end else begin
      u1_q <= u1[N];
      u2_q <= u2[N];
    end
  end

endmodule
