// tisd_pkg -- constants shared by the time-interleaved sigma-delta modulator.
//
// The loop filter is a low-pass CIFB (cascade of integrators with distributed
// feedback) of order M, 1 to 4:
//   q[n]   = Sgn{u_M[n-1]}
//   u_1[n] = b1*x[n] - a_1*q[n] + u_1[n-1]
//   u_k[n] = u_{k-1}[n-1] - a_k*q[n] + u_k[n-1]      (k = 2..M)
// Its noise transfer function is (1-z^-1)^M / D(z) with
//   D(z) = (1-z^-1)^M + sum_k a_k z^-(M-k+1) (1-z^-1)^(k-1).
// The feedback coefficients a_k below are the unique solution that places the
// roots of D(z) on the NTF poles used for the 2nd, 3rd and 4th order designs
// (NTF zeros all at z = 1, peak NTF gain 1.5) -- the published pole sets:
//   M=2: 0.61 +/- j0.26
//   M=3: 0.77 +/- j0.28, 0.67
//   M=4: 0.85 +/- j0.25, 0.75 +/- j0.088
// Order 1 has no published pole set; a_1 = 1 (NTF = 1 - z^-1, pole at 0) is
// this design's choice for it.
// b1 is set equal to a_1, which makes the signal transfer function
// b1 z^-M / D(z) exactly 1 at DC. The coefficient values are this design's
// derivation from those poles; the pole positions are the published ones.
// Coefficients become integers on a 2^FRAC scale (round to nearest) in
// coef_int(); with FRAC = 8 the 2nd-order loop uses a = {56, 200}, b1 = 56.
package tisd_pkg;

  localparam int MAX_ORDER = 4;

  // a_k for order m, k = 1..m (k = 0 is unused and returns b1 = a_1).
  function automatic real coef_a(input int m, input int k);
    real a [MAX_ORDER+1];
    case (m)
      1: a = '{0.0, 1.0, 0.0, 0.0, 0.0};
      2: a = '{0.0, 0.2197, 0.78, 0.0, 0.0};
      3: a = '{0.0, 0.043329, 0.2831, 0.79, 0.0};
      default: a = '{0.0, 0.00597074, 0.0635732, 0.305244, 0.8};
    endcase
    if (k == 0) return a[1];
    return a[k];
  endfunction

  // Coefficient rounded to the nearest integer on a 2^frac scale.
  function automatic int coef_int(input int m, input int k, input int frac);
    return $rtoi(coef_a(m, k) * real'(64'(1) << frac) + 0.5);
  endfunction

  // How the low-rate input reaches the N parallel sections.
  typedef enum logic [1:0] {
    IN_SAMPLE_HOLD = 2'd0,  // every section sees b1*x of one held sample
    IN_ZERO_INSERT = 2'd1,  // one section sees N*b1*x, the others 0
    IN_FULL_RATE   = 2'd2   // section k sees b1*x[Nn+k], N samples per clock
  } in_mode_e;

endpackage
