// tisd_top -- FPGA build of the time-interleaved sigma-delta transmitter path,
// with the parallel-FIR example beside it.
//
// Modulator path: a low-rate multibit input x (taken when x_valid = 1, e.g.
// every second clock for 50 MS/s input on a 100 MHz clock) is held and fed to a
// second-order CIFB modulator expanded into N = 4 time slots (tisd_core), which
// returns 4 output bits per clock, a 400 Mb/s single-bit stream at 100 MHz. The
// bits go out two ways: q_par, the raw group per clock (q_par[0] first in
// time), and ser_word, 20-bit words with a ser_valid pulse for a parallel-to-
// serial transmitter (tisd_out_packer) that sends bit 0 first. The serializer
// itself, its PLL and the 1-bit DAC are outside this RTL.
//
// With MODE = IN_FULL_RATE the modulator instead takes N samples per clock on
// x_slot (one per output instant); x_slot is unused in the default mode.
//
// FIR example: fir_ti, a second-order FIR computing two consecutive outputs
// per clock, stands alone with its own ports (fir_x, fir_y).
//
// Timing: q_par_valid rises on the first clock after reset and q_par then
// carries a new group on every clock; a sample taken at edge t
// first affects q_par after edge t+1. ser_word is valid for the clock after
// the edge that completed it. rst_n is synchronous and active low.
module tisd_top
  import tisd_pkg::*;
#(
  parameter int       N      = 4,
  parameter int       M      = 2,
  parameter int       W      = 11,
  parameter int       FRAC   = 8,
  parameter int       XW     = 11,
  parameter in_mode_e MODE   = IN_SAMPLE_HOLD,
  parameter int       SER_W  = 20,
  parameter int       FIR_N  = 2,
  parameter int       FIR_DW = 12,
  parameter int       FIR_CW = 8,
  localparam int      FIR_YW = FIR_DW + FIR_CW + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // modulator
  input  logic                     x_valid,
  input  logic signed [XW-1:0]     x,
  input  logic signed [XW-1:0]     x_slot [N],  // MODE = IN_FULL_RATE only
  output logic        [N-1:0]      q_par,
  output logic                     q_par_valid,
  output logic        [SER_W-1:0]  ser_word,
  output logic                     ser_valid,
  // FIR example
  input  logic signed [FIR_DW-1:0] fir_x [FIR_N],
  output logic signed [FIR_YW-1:0] fir_y [FIR_N]
);

  tisd_core #(
    .N(N), .M(M), .W(W), .FRAC(FRAC), .XW(XW), .MODE(MODE)
  ) u_core (
    .clk, .rst_n, .x_valid, .x, .x_slot, .q(q_par), .q_valid(q_par_valid)
  );

  tisd_out_packer #(.N(N), .SER_W(SER_W)) u_pack (
    .clk, .rst_n,
    .in_valid   (q_par_valid),
    .q          (q_par),
    .word       (ser_word),
    .word_valid (ser_valid)
  );

  fir_ti #(.N(FIR_N), .DW(FIR_DW), .CW(FIR_CW)) u_fir (
    .clk, .rst_n, .x(fir_x), .y(fir_y)
  );

endmodule
