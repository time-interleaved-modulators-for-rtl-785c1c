// tisd_core -- time-interleaved low-pass CIFB sigma-delta modulator.
//
// An order-M single-bit CIFB modulator whose node equations have been written
// for N consecutive instants Nn, Nn+1, ..., Nn+N-1. Each instant is one
// tisd_cifb_section; section k takes the integrator states computed by section
// k-1 (section 0 takes them from the state register, i.e. instant Nn-1), and
// only the states of the last section are stored. One clock therefore produces
// N output bits, and the modulator runs at N times the clock rate: 4 x 100 MHz
// = 400 MHz output rate with the default N = 4. The output stream equals, bit
// for bit, that of the same modulator clocked N times faster.
//
// Input (tisd_input_sh): x is a low-rate signed XW-bit fraction taken when
// x_valid = 1 and held. MODE selects how it reaches the sections:
//   IN_SAMPLE_HOLD  every section gets b1*x (the input is repeated N times).
//   IN_ZERO_INSERT  section ZI_SLOT gets N*b1*x and the others 0 (the input is
//                   upsampled with zeros; the gain N restores the signal level).
//   IN_FULL_RATE    section k gets b1*x_slot[k]: N input samples per clock, one
//                   per instant, the unreduced form of the expansion. x_slot
//                   is taken when x_valid = 1 and held like x.
// Sample-and-hold with N = 4, M = 2 and 11-bit integrators is the configuration
// built on the FPGA; zero insertion is the lighter alternative form.
// ZI_SLOT = 0 (the earliest instant) is this design's choice. In
// IN_FULL_RATE mode x is not used, in the other modes x_slot is not used.
//
// The input term and the first feedback are added before the chain: from the
// held bx, in - a_1 and in + a_1 are formed for every section (constants -a_1
// and +a_1 for the sections that get no input under zero insertion), and each
// section only selects one. This removes one addition per instant from the
// path, and for zero insertion removes the input adder from all but one
// section.
//
// Output: q[k] is the bit for instant Nn+k (1 = +1, 0 = -1), q[0] first in
// time. q is registered: the group computed from the state and the held input
// during one clock appears after that clock's rising edge. A sample taken at edge t thus
// first affects q after edge t+1. q_valid is low from reset until the first
// group has been computed, then stays high: one group per clock. Synchronous
// active-low reset clears the integrators, q and q_valid.
module tisd_core
  import tisd_pkg::*;
#(
  parameter int       N       = 4,   // parallel sections (time slots per clock)
  parameter int       M       = 2,   // modulator order, 1..4
  parameter int       W       = 11,  // integrator word length
  parameter int       FRAC    = 8,   // fraction bits of the integrator scale
  parameter int       XW      = 11,  // input word length
  parameter in_mode_e MODE    = IN_SAMPLE_HOLD,
  parameter int       ZI_SLOT = 0    // section fed in IN_ZERO_INSERT mode
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  input  logic signed [XW-1:0] x_slot [N],  // IN_FULL_RATE only
  output logic        [N-1:0]  q,
  output logic                 q_valid  // q holds a computed group
);

  localparam int B1   = coef_int(M, 0, FRAC);
  localparam int A1   = coef_int(M, 1, FRAC);
  localparam int GAIN = (MODE == IN_ZERO_INSERT) ? N * B1 : B1;

  logic signed [W-1:0] bx [N];   // held input term per section
  logic signed [W-1:0] state  [M];        // u_1..u_M at instant Nn-1
  logic signed [W-1:0] in_term [N];
  logic signed [W-1:0] in_p [N];     // in_term - a_1
  logic signed [W-1:0] in_m [N];     // in_term + a_1
  logic        [N-1:0] q_c;

  if (MODE == IN_FULL_RATE) begin : g_in_full
    for (genvar k = 0; k < N; k++) begin : g_slot
      tisd_input_sh #(.W(W), .XW(XW), .GAIN(B1)) u_in (
        .clk, .rst_n, .x_valid, .x(x_slot[k]), .bx(bx[k])
      );
    end
  end else begin : g_in_one
    // one shared input register
    tisd_input_sh #(.W(W), .XW(XW), .GAIN(GAIN)) u_in (
      .clk, .rst_n, .x_valid, .x, .bx(bx[0])
    );
    for (genvar k = 1; k < N; k++) begin : g_share
      assign bx[k] = bx[0];
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      if (MODE == IN_ZERO_INSERT) in_term[k] = (k == ZI_SLOT) ? bx[k] : '0;
      else                        in_term[k] = bx[k];
      in_p[k] = in_term[k] - W'(A1);
      in_m[k] = in_term[k] + W'(A1);
    end
  end

  // Section k reads the states written by section k-1; section 0 reads the
  // state register (instant Nn-1).
  for (genvar k = 0; k < N; k++) begin : g_sec
    logic signed [W-1:0] u_prev [M];
    logic signed [W-1:0] u_next [M];

    if (k == 0) begin : g_first
      assign u_prev = state;
    end else begin : g_next
      assign u_prev = g_sec[k-1].u_next;
    end

    tisd_cifb_section #(.M(M), .W(W), .FRAC(FRAC)) u_sec (
      .u_prev  (u_prev),
      .in_p    (in_p[k]),
      .in_m    (in_m[k]),
      .q       (q_c[k]),
      .u_next  (u_next)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) state[i] <= '0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      state   <= g_sec[N-1].u_next;
      q       <= q_c;
      q_valid <= 1'b1;
    end
  end

endmodule
