// tisd_cifb_section -- one time slot of the time-interleaved CIFB modulator.
//
// A section evaluates the modulator's node equations once, for one sampling
// instant t, from the integrator states of the instant before:
//   q      = Sgn{u_M[t-1]}              (q = 1 stands for +1, 0 for -1)
//   u_1[t] = in - a_1*q + u_1[t-1]       (in = b1*x[t], or 0 / N*b1*x in
//                                         the zero-insertion form)
//   u_k[t] = u_{k-1}[t-1] - a_k*q + u_k[t-1],  k = 2..M
// It is purely combinational. N of them are chained inside tisd_core, each one
// taking u_prev from the section before it, so that one clock computes N
// consecutive instants. The quantizer only reads a state of the instant before,
// so the longest path through a section is the sign bit selecting +/-a_k and a
// three-operand addition, whatever the order M.
//
// The first integrator does not add the input term and the feedback in the
// chain: the caller supplies both sums in - a_1 (in_p, used when q = +1) and
// in + a_1 (in_m, when q = -1), formed once per clock from the held input,
// and the section only selects one and adds it to u_1. This takes one addition
// per instant out of the first integrator's path; for a first-order loop it
// shortens the whole chain by one addition per output. It is an exact
// rearrangement of the equations above.
//
// Numbers are W-bit two's complement on a 2^FRAC scale; the sums wrap, and the
// input range must keep the loop stable (as for any single-bit modulator).
// Sgn{0} is taken as +1. The a_k are rounded from tisd_pkg.
module tisd_cifb_section
  import tisd_pkg::*;
#(
  parameter int M    = 2,   // modulator order
  parameter int W    = 11,  // integrator word length
  parameter int FRAC = 8    // fraction bits of the integrator scale
) (
  input  logic signed [W-1:0] u_prev [M],  // states u_1..u_M at t-1
  input  logic signed [W-1:0] in_p,        // in - a_1, used when q = +1
  input  logic signed [W-1:0] in_m,        // in + a_1, used when q = -1
  output logic                q,           // output bit for instant t
  output logic signed [W-1:0] u_next [M]   // states at t
);

  logic signed [W-1:0] fb [M];  // -a_k * q (fb[0] unused: see in_p / in_m)

  assign q = ~u_prev[M-1][W-1];

  assign fb[0] = '0;

  for (genvar k = 1; k < M; k++) begin : g_fb
    localparam logic signed [W-1:0] AK = W'(coef_int(M, k + 1, FRAC));
    assign fb[k] = q ? -AK : AK;
  end

  always_comb begin
    u_next[0] = (q ? in_p : in_m) + u_prev[0];
    for (int k = 1; k < M; k++) begin
      u_next[k] = u_prev[k-1] + fb[k] + u_prev[k];
    end
  end

endmodule
