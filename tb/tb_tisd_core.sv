// tb_tisd_core -- self-checking test of the time-interleaved CIFB modulator.
//
// Four copies run side by side on the same input: sample-and-hold with N = 4
// and with N = 1, zero insertion with N = 4, and the full-rate form with N = 4
// (four distinct samples per clock, spread around the same level). A serial reference
// (tb_cifb_ref_pkg) evaluates the modulator one instant at a time, N instants
// per clock, and every output bit of every copy is compared, which also checks
// the one-clock latency from the held input to q. The input is taken every
// second clock (low input rate), first as DC levels and then as a sine. For the
// DC levels the mean of the +/-1 output is also compared with the held input
// b1*x / a1, a check that needs no reference model.
module tb_tisd_core;
  import tb_cifb_ref_pkg::*;
  import tisd_pkg::*;

  logic clk = 0;
  logic rst_n = 0;
  logic x_valid = 0;
  logic signed [10:0] x = '0;
  logic [3:0] q4, qz, qp;
  logic v4, v1, vz, vp;
  logic signed [10:0] xs [4];     // full-rate samples, one per instant
  logic signed [10:0] xs1 [1];    // unused x_slot of the other copies
  logic signed [10:0] xs0 [4];
  logic [0:0] q1;

  int checks = 0, failures = 0;
  int cycle = 0;

  tisd_core #(.N(4)) dut4 (.clk, .rst_n, .x_valid, .x, .x_slot(xs0), .q(q4), .q_valid(v4));
  tisd_core #(.N(1)) dut1 (.clk, .rst_n, .x_valid, .x, .x_slot(xs1), .q(q1), .q_valid(v1));
  tisd_core #(.N(4), .MODE(IN_ZERO_INSERT)) dutz (.clk, .rst_n, .x_valid, .x, .x_slot(xs0), .q(qz), .q_valid(vz));
  tisd_core #(.N(4), .MODE(IN_FULL_RATE)) dutp (.clk, .rst_n, .x_valid, .x(11'sd0), .x_slot(xs), .q(qp), .q_valid(vp));
  assign xs0 = '{default: '0};
  assign xs1 = '{default: '0};

  always #5 clk = ~clk;

  // reference state
  ref_state_t s4, s1, sz, sp;
  int bx_sh, bx_zi;
  int bx_p [4];
  logic [3:0] e4, ez, ep;
  int applied_xs [4];
  logic e1;
  logic applied_valid;
  logic signed [10:0] applied_x;
  logic applied_rst;
  logic rst_req = 0;

  // DC mean measurement
  int sum_q, n_q;

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d got %b exp %b", what, cycle, got, exp);
    end
  endtask

  always @(negedge clk) begin
    cycle++;
    // apply the edge that just happened to the reference
    if (!applied_rst) begin
      s4 = '{0, 0}; s1 = '{0, 0}; sz = '{0, 0}; sp = '{0, 0};
      bx_sh = 0; bx_zi = 0; e4 = '0; ez = '0; e1 = 0; ep = '0;
      bx_p = '{0, 0, 0, 0};
    end else begin
      for (int k = 0; k < 4; k++) begin
        e4[k] = out_bit(s4);
        s4    = next_state(s4, bx_sh);
      end
      e1 = out_bit(s1);
      s1 = next_state(s1, bx_sh);
      for (int k = 0; k < 4; k++) begin
        ez[k] = out_bit(sz);
        sz    = next_state(sz, (k == 0) ? bx_zi : 0);
      end
      for (int k = 0; k < 4; k++) begin
        ep[k] = out_bit(sp);
        sp    = next_state(sp, bx_p[k]);
      end
      if (applied_valid) begin
        bx_sh = scale_in(int'(applied_x), B1);
        bx_zi = scale_in(int'(applied_x), 4 * B1);
        for (int k = 0; k < 4; k++) bx_p[k] = scale_in(applied_xs[k], B1);
      end
    end
    checks++;
    if ({v4, v1, vz, vp} !== {4{applied_rst}}) begin
      failures++;
      if (failures < 10) $display("FAIL q_valid cycle %0d", cycle);
    end
    if (applied_rst) begin
      check(q4, e4, "N=4 S&H");
      check({3'b0, q1}, {3'b0, e1}, "N=1 S&H");
      check(qz, ez, "N=4 ZI");
      check(qp, ep, "N=4 full rate");
      for (int k = 0; k < 4; k++) sum_q += q4[k] ? 1 : -1;
      n_q += 4;
    end
  end

  task automatic drive(input logic v, input int xv);
    @(negedge clk);
    #1;
    rst_n = rst_req;
    x_valid = v;
    x = 11'(xv);
    applied_valid = v;
    applied_x = 11'(xv);
    // full-rate copy: four samples per clock around the same level
    for (int k = 0; k < 4; k++) begin
      applied_xs[k] = xv + 40 * k - 60;
      xs[k] = 11'(applied_xs[k]);
    end
    applied_rst = rst_n;
  endtask

  // hold a DC level; measure mean of the N=4 output after settling
  task automatic dc_run(input int xv, input int clocks);
    real mean, expect_mean;
    for (int i = 0; i < 200; i++) drive(i[0], xv);
    sum_q = 0; n_q = 0;
    for (int i = 0; i < clocks; i++) drive(i[0], xv);
    mean = real'(sum_q) / real'(n_q);
    expect_mean = real'(scale_in(xv, B1)) / real'(A1);
    checks++;
    if (mean - expect_mean > 0.01 || expect_mean - mean > 0.01) begin
      failures++;
      $display("FAIL DC x=%0d mean %f expected %f", xv, mean, expect_mean);
    end
  endtask

  initial begin
    applied_rst = 0; applied_valid = 0; applied_x = '0;
    sum_q = 0; n_q = 0;
    repeat (3) drive(0, 0);
    rst_req = 1;
    dc_run(0, 2000);
    dc_run(307, 2000);     // 0.3 full scale
    dc_run(-512, 2000);    // -0.5
    dc_run(700, 2000);     // ~0.68
    // sine, amplitude 0.5, new sample every second clock
    for (int i = 0; i < 20000; i++) begin
      int xv;
      xv = $rtoi(511.0 * $sin(2.0 * 3.14159265 * real'(i / 2) / 997.0));
      drive(i[0] == 0, xv);
    end
    drive(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
