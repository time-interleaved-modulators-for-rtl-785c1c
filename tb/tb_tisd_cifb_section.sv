// tb_tisd_cifb_section -- checks one combinational modulator section against
// the node equations with hand-rounded coefficients (order 2, 11-bit words on
// a 2^8 scale: a1 = 56, a2 = 200), over random states and input terms, and
// covers both quantizer outcomes and the Sgn{0} = +1 case. The section takes
// the input term t as the two sums t - a1 and t + a1.
module tb_tisd_cifb_section;
  import tb_cifb_ref_pkg::*;

  logic signed [10:0] u_prev [2];
  logic signed [10:0] u_next [2];
  logic signed [10:0] in_p, in_m;
  logic q;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  tisd_cifb_section dut (.u_prev, .in_p, .in_m, .q, .u_next);

  task automatic run(input int a, input int b, input int t);
    ref_state_t s, r;
    u_prev[0] = 11'(a);
    u_prev[1] = 11'(b);
    in_p      = 11'(t - A1);   // input term t with the a_1 feedback folded in
    in_m      = 11'(t + A1);
    #1;
    s.u1 = wrap11(a);
    s.u2 = wrap11(b);
    r = next_state(s, wrap11(t));
    checks++;
    if (q !== out_bit(s) || int'(u_next[0]) != r.u1 || int'(u_next[1]) != r.u2) begin
      failures++;
      if (failures < 10)
        $display("FAIL u=(%0d,%0d) in=%0d got q=%b (%0d,%0d) exp q=%b (%0d,%0d)",
                 s.u1, s.u2, t, q, u_next[0], u_next[1], out_bit(s), r.u1, r.u2);
    end
    if (q) n_pos++; else n_neg++;
  endtask

  initial begin
    run(0, 0, 0);
    checks++;
    if (q !== 1'b1 || u_next[0] != -11'sd56 || u_next[1] != -11'sd200) failures++;
    run(10, -1, 5);
    checks++;
    if (q !== 1'b0 || u_next[0] != 11'sd71 || u_next[1] != 11'sd209) failures++;
    for (int i = 0; i < 2000; i++)
      run(int'($urandom_range(0, 1200)) - 600, int'($urandom_range(0, 1200)) - 600,
          int'($urandom_range(0, 200)) - 100);
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
