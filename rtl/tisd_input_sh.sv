// tisd_input_sh -- input sample-and-hold and input gain of the modulator.
//
// The multibit input x arrives at a low rate and is held: a new sample is taken
// only on a clock where x_valid is high, and the scaled value stays on bx for as
// many clocks as it takes for the next one to come. This is the sample-and-hold
// rate increase: with N parallel sections, every one of the N time slots of a
// clock (and every clock until the next sample) sees the same input.
//
// x is a signed fraction with XW bits (value x / 2^(XW-1)). The output bx is the
// input term b1*x on the integrators' fixed-point scale, 2^FRAC per unit, in W
// bits:  bx = floor(GAIN * x / 2^(XW-1)),  GAIN = round(b1 * 2^FRAC) for
// sample-and-hold, or N times that for zero insertion (set by the instantiating
// core). Doing the product here, into a register, keeps the input multiplier out
// of the modulator's feedback path; the register stage and floor rounding are
// this design's choices.
//
// Timing: x is taken on the rising clk edge where x_valid = 1; bx shows it from
// that edge on. Reset (active-low, synchronous) clears bx to 0.
module tisd_input_sh #(
  parameter int W    = 11,  // integrator word length
  parameter int XW   = 11,  // input word length
  parameter int GAIN = 56   // b1 (or N*b1) on the 2^FRAC scale
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [XW-1:0] x,
  output logic signed [W-1:0]  bx
);

  localparam int PW = XW + 32;  // product width, wide enough for any int gain

  logic signed [PW-1:0] prod;
  logic signed [W-1:0]  scaled;

  always_comb begin
    prod   = PW'(x) * PW'(GAIN);
    scaled = W'(prod >>> (XW - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       bx <= '0;
    else if (x_valid) bx <= scaled;
  end

endmodule
