// tb_tisd_snr -- in-band SNR of the time-interleaved modulator for N = 1, 2, 4.
//
// Reproduces the rate comparison of the FPGA build: a 2nd-order modulator on a
// 100 MHz clock with N = 1, 2 and 4 parallel sections (100, 200 and 400 MHz
// output rate), fed by the same sine sampled at 50 MS/s and held, with a
// 1.25 MHz signal band. For each copy 16384 output bits are windowed
// (4-term Blackman-Harris) and the DFT is taken on the in-band bins only. SNR =
// power in the bins around the tone / power in the other in-band bins (the
// lowest 3 bins, DC leakage, are left out).
//
// Because every output bit sees the noise shaping of the full-rate loop, each
// doubling of N should gain about 15 dB (second order), far more than the 3 dB
// of N independent modulators. The check asks for at least 10 dB per doubling.
// These copies use 16-bit integrators on a 2^13 scale and a 16-bit input, so
// that word length does not mask the loop. A copy at the default 11-bit sizes
// (N = 4) is measured as well and must reach 40 dB; with 11 bits the input
// term b1*x keeps only about 7 bits, which sets its noise floor.
module tb_tisd_snr;
  localparam int L    = 16384;
  localparam real PI  = 3.14159265358979;
  localparam real FCLK = 100.0e6;
  localparam real F0   = 0.4e6;
  localparam real BW   = 1.25e6;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [15:0] x16 = '0;
  logic signed [10:0] x11 = '0;
  logic [0:0] q1;
  logic [1:0] q2;
  logic [3:0] q4, q4d;
  logic v1, v2, v4, v4d;
  logic signed [15:0] z16 [4];  // x_slot, unused in sample-and-hold
  logic signed [10:0] z11 [4];
  assign z16 = '{default: '0};
  assign z11 = '{default: '0};

  tisd_core #(.N(1), .W(16), .FRAC(13), .XW(16)) dut1 (.clk, .rst_n, .x_valid, .x(x16), .x_slot(z16[0:0]), .q(q1), .q_valid(v1));
  tisd_core #(.N(2), .W(16), .FRAC(13), .XW(16)) dut2 (.clk, .rst_n, .x_valid, .x(x16), .x_slot(z16[0:1]), .q(q2), .q_valid(v2));
  tisd_core #(.N(4), .W(16), .FRAC(13), .XW(16)) dut4 (.clk, .rst_n, .x_valid, .x(x16), .x_slot(z16), .q(q4), .q_valid(v4));
  tisd_core dut4d (.clk, .rst_n, .x_valid, .x(x11), .x_slot(z11), .q(q4d), .q_valid(v4d));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit b1 [L];
  bit b2 [L];
  bit b4 [L];
  bit b4d [L];
  int n1 = 0, n2 = 0, n4 = 0;

  function automatic real bh(int n);
    real t;
    t = 2.0 * PI * real'(n) / real'(L);
    return 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
  endfunction

  // SNR in dB of a +/-1 record sampled at fs
  function automatic real snr_db(ref bit b [L], input real fs);
    int kmax, k0;
    real ps, pn;
    kmax = $rtoi(BW / fs * real'(L));
    k0   = $rtoi(F0 / fs * real'(L) + 0.5);
    ps = 0.0;
    pn = 0.0;
    for (int k = 3; k <= kmax; k++) begin
      real re, im, p;
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < L; n++) begin
        real v, ph;
        v  = (b[n] ? 1.0 : -1.0) * bh(n);
        ph = 2.0 * PI * real'(k) * real'(n) / real'(L);
        re += v * $cos(ph);
        im -= v * $sin(ph);
      end
      p = re * re + im * im;
      if (k >= k0 - 6 && k <= k0 + 6) ps += p;
      else pn += p;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real s1, s2, s4, s4d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000 + L; i++) begin
      real xs;
      xs = 0.5 * $sin(2.0 * PI * F0 * real'(i / 2) * 2.0 / FCLK);
      x_valid = (i % 2 == 0);
      x16 = 16'($rtoi(xs * 32767.0));
      x11 = 11'($rtoi(xs * 1023.0));
      @(negedge clk);
      if (i >= 2000) begin
        if (n1 < L) begin b1[n1] = q1[0]; n1++; end
        for (int k = 0; k < 2; k++) if (n2 < L) begin b2[n2] = q2[k]; n2++; end
        for (int k = 0; k < 4; k++) if (n4 < L) begin b4[n4] = q4[k]; b4d[n4] = q4d[k]; n4++; end
      end
    end
    s1  = snr_db(b1, FCLK);
    s2  = snr_db(b2, 2.0 * FCLK);
    s4  = snr_db(b4, 4.0 * FCLK);
    s4d = snr_db(b4d, 4.0 * FCLK);
    $display("in-band SNR (dB): N=1 %0.1f  N=2 %0.1f  N=4 %0.1f  N=4 11-bit %0.1f", s1, s2, s4, s4d);
    checks++;
    if (s2 - s1 < 10.0) begin failures++; $display("FAIL N=1 -> N=2 gain %0.1f dB", s2 - s1); end
    checks++;
    if (s4 - s2 < 10.0) begin failures++; $display("FAIL N=2 -> N=4 gain %0.1f dB", s4 - s2); end
    checks++;
    if (s4d < 40.0) begin failures++; $display("FAIL 11-bit SNR %0.1f dB", s4d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
