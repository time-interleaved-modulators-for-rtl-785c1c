// tb_cifb_ref_pkg -- plain serial reference of the single-bit 2nd-order CIFB
// modulator, one output per call, used to check the parallel hardware.
//
// The numbers are worked out by hand for the default configuration, not read
// from the RTL: integrators of 11 bits on a 2^8 scale, a1 = b1 = 0.2197 -> 56,
// a2 = 0.78 -> 200 (NTF poles 0.61 +/- j0.26), an 11-bit input fraction, and
// b1*x = floor(gain*x / 1024). Sums wrap at 11 bits, Sgn{0} = +1.
package tb_cifb_ref_pkg;

  localparam int A1 = 56;
  localparam int A2 = 200;
  localparam int B1 = 56;

  typedef struct {
    int u1;
    int u2;
  } ref_state_t;

  function automatic int wrap11(input int v);
    int r;
    r = v & 32'h7FF;
    if (r >= 1024) r -= 2048;
    return r;
  endfunction

  function automatic int scale_in(input int x, input int gain);
    return wrap11((x * gain) >>> 10);
  endfunction

  // Output bit of the instant that follows state s (1 = +1).
  function automatic bit out_bit(input ref_state_t s);
    return s.u2 >= 0;
  endfunction

  // State after one instant with input term in_term.
  function automatic ref_state_t next_state(input ref_state_t s, input int in_term);
    ref_state_t r;
    int fb1, fb2;
    fb1  = out_bit(s) ? -A1 : A1;
    fb2  = out_bit(s) ? -A2 : A2;
    r.u1 = wrap11(in_term + fb1 + s.u1);
    r.u2 = wrap11(s.u1 + fb2 + s.u2);
    return r;
  endfunction

endpackage
