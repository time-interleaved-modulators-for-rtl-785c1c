// tb_tisd_workloads -- runs the modulator in the configurations that are
// evaluated for this architecture, beyond the default N = 4, order 2 build:
//   c0  order 2, N = 2,  11-bit, sample-and-hold (the 200 MHz FPGA build)
//   c1  order 3, N = 8,  sample-and-hold
//   c2  order 3, N = 16, sample-and-hold
//   c3  order 4, N = 16, sample-and-hold
//   c4  order 3, N = 8,  zero insertion
//   c5  order 4, N = 16, zero insertion
//   c6  order 2, N = 16, zero insertion
//   c7  order 1, N = 4,  sample-and-hold (the first-order FPGA build)
// Orders 3 and 4 need finer coefficients than order 2, so they run with wider
// integrators (14 bits on a 2^10 scale, 16 bits on a 2^13 scale). Every output
// bit is compared with a serial model of the order-M CIFB loop stepped N
// instants per clock, with coefficients rounded by hand from the NTF poles:
//   order 2, 2^8 : a = 56, 200
//   order 3, 2^10: a = 44, 290, 809
//   order 4, 2^13: a = 49, 521, 2501, 6554
//   order 1, 2^8 : a = 256 (a1 = 1, NTF = 1 - z^-1)  (b1 = a1 in all)
// Each configuration first holds three DC levels, where the mean output must
// equal the input term over a1, then takes a two-tone input (0.25 + 0.25 full
// scale) with a new sample on every clock.
module tb_tisd_workloads;
  import tisd_pkg::*;

  localparam int NC = 8;
  localparam int CM    [NC] = '{2, 3, 3, 4, 3, 4, 2, 1};
  localparam int CN    [NC] = '{2, 8, 16, 16, 8, 16, 16, 4};
  localparam int CW    [NC] = '{11, 14, 14, 16, 14, 16, 11, 11};
  localparam int CF    [NC] = '{8, 10, 10, 13, 10, 13, 8, 8};
  localparam bit CZI   [NC] = '{0, 0, 0, 0, 1, 1, 1, 0};

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [10:0] x = '0;
  logic [15:0] q_all [NC];
  logic        v_all [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    logic signed [10:0] xs [CN[c]];  // x_slot, unused in these modes
    assign xs = '{default: '0};
    tisd_core #(
      .N(CN[c]), .M(CM[c]), .W(CW[c]), .FRAC(CF[c]),
      .MODE(CZI[c] ? IN_ZERO_INSERT : IN_SAMPLE_HOLD)
    ) dut (
      .clk, .rst_n, .x_valid, .x, .x_slot(xs), .q(q_all[c][CN[c]-1:0]), .q_valid(v_all[c])
    );
    if (CN[c] < 16) begin : g_pad
      assign q_all[c][15:CN[c]] = '0;
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int st [NC][4];
  int bx [NC];
  int sum_q [NC];
  int n_q [NC];

  function automatic int coef(int m, int k);
    case (m)
      1: return 256;
      2: return (k == 0) ? 56 : 200;
      3: return (k == 0) ? 44 : (k == 1) ? 290 : 809;
      default: return (k == 0) ? 49 : (k == 1) ? 521 : (k == 2) ? 2501 : 6554;
    endcase
  endfunction

  function automatic int wrapw(int v, int w);
    int r;
    r = v & ((1 << w) - 1);
    if (r >= (1 << (w - 1))) r -= (1 << w);
    return r;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // one clock of the serial model for configuration c; returns the N bits
  function automatic logic [15:0] ref_clock(int c);
    logic [15:0] e = '0;
    int m = CM[c];
    for (int k = 0; k < CN[c]; k++) begin
      int nx [4];
      bit q;
      int in_t;
      q    = (st[c][m-1] >= 0);
      in_t = CZI[c] ? ((k == 0) ? bx[c] : 0) : bx[c];
      for (int j = 0; j < m; j++) begin
        int fb;
        fb = q ? -coef(m, j) : coef(m, j);
        nx[j] = wrapw(((j == 0) ? in_t : st[c][j-1]) + fb + st[c][j], CW[c]);
      end
      for (int j = 0; j < m; j++) st[c][j] = nx[j];
      e[k] = q;
    end
    return e;
  endfunction

  // drive one clock; xv is taken if v; check all outputs after the edge
  task automatic clock_in(input logic v, input int xv);
    x_valid = v;
    x = 11'(xv);
    @(negedge clk);
    cycle++;
    for (int c = 0; c < NC; c++) begin
      logic [15:0] e;
      e = ref_clock(c);
      if (v) bx[c] = wrapw((xv * coef(CM[c], 0) * (CZI[c] ? CN[c] : 1)) >>> 10, CW[c]);
      checks++;
      if (!v_all[c] || q_all[c] !== e) fail($sformatf("c%0d got %h exp %h", c, q_all[c], e));
      for (int k = 0; k < CN[c]; k++) sum_q[c] += q_all[c][k] ? 1 : -1;
      n_q[c] += CN[c];
    end
  endtask

  task automatic dc_run(input int xv);
    for (int i = 0; i < 300; i++) clock_in(1'b1, xv);
    foreach (sum_q[c]) begin sum_q[c] = 0; n_q[c] = 0; end
    for (int i = 0; i < 1500; i++) clock_in(1'b1, xv);
    for (int c = 0; c < NC; c++) begin
      real mean, expect_mean;
      mean = real'(sum_q[c]) / real'(n_q[c]);
      expect_mean = real'(bx[c]) / real'(coef(CM[c], 0) * (CZI[c] ? CN[c] : 1));
      checks++;
      if (mean - expect_mean > 0.01 || expect_mean - mean > 0.01)
        fail($sformatf("c%0d DC mean %f expected %f", c, mean, expect_mean));
    end
  endtask

  initial begin
    foreach (st[c, j]) st[c][j] = 0;
    foreach (bx[c]) begin bx[c] = 0; sum_q[c] = 0; n_q[c] = 0; end
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    dc_run(200);
    dc_run(-400);
    dc_run(300);
    for (int i = 0; i < 12000; i++) begin
      int xv;
      xv = $rtoi(255.0 * $sin(2.0 * 3.14159265 * real'(i) / 2003.0)
               + 255.0 * $sin(2.0 * 3.14159265 * real'(i) / 1499.0));
      clock_in(1'b1, xv);
    end
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
