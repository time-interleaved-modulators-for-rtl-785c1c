// tb_tisd_pkg -- checks the loop coefficients of tisd_pkg.
//
// For orders 2, 3 and 4 the denominator of the noise transfer function,
//   D(z) = (1-z^-1)^M + sum_k a_k z^-(M-k+1) (1-z^-1)^(k-1),
// is expanded from the package's a_k and compared, coefficient by coefficient,
// with prod (1 - p z^-1) over the target NTF poles:
//   M=2: 0.61 +/- j0.26   M=3: 0.77 +/- j0.28, 0.67
//   M=4: 0.85 +/- j0.25, 0.75 +/- j0.088
// Also checked: b1 = a1 (unity signal gain at DC), order 1 giving D = 1, and
// the integer coefficients on the 2^8 scale (56 and 200 for order 2, 256 for
// order 1) and on the 2^10 / 2^13 scales for orders 3 and 4.
module tb_tisd_pkg;
  import tisd_pkg::*;

  int checks = 0, failures = 0;

  // polynomial in z^-1, index = power
  typedef real poly_t [6];

  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t r;
    foreach (r[i]) r[i] = 0.0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; i + j < 6; j++) r[i+j] += a[i] * b[j];
    return r;
  endfunction

  function automatic poly_t pone();
    poly_t r;
    foreach (r[i]) r[i] = 0.0;
    r[0] = 1.0;
    return r;
  endfunction

  function automatic poly_t from_a(int m);
    poly_t d, t, one_minus, zpow;
    foreach (one_minus[i]) one_minus[i] = 0.0;
    one_minus[0] = 1.0;
    one_minus[1] = -1.0;
    d = pone();
    for (int i = 0; i < m; i++) d = pmul(d, one_minus);
    for (int k = 1; k <= m; k++) begin
      t = pone();
      for (int i = 0; i < k - 1; i++) t = pmul(t, one_minus);
      foreach (zpow[i]) zpow[i] = 0.0;
      zpow[m-k+1] = coef_a(m, k);
      t = pmul(t, zpow);
      foreach (d[i]) d[i] += t[i];
    end
    return d;
  endfunction

  // (1 - 2 re z^-1 + (re^2+im^2) z^-2) for a complex pair, (1 - re z^-1) if im = 0
  function automatic poly_t factor(real re, real im);
    poly_t f = pone();
    if (im == 0.0) f[1] = -re;
    else begin
      f[1] = -2.0 * re;
      f[2] = re * re + im * im;
    end
    return f;
  endfunction

  task automatic compare(int m, poly_t target);
    poly_t d = from_a(m);
    for (int i = 0; i <= m; i++) begin
      checks++;
      if (d[i] - target[i] > 1e-4 || target[i] - d[i] > 1e-4) begin
        failures++;
        $display("FAIL order %0d coefficient z^-%0d: %f expected %f", m, i, d[i], target[i]);
      end
    end
  endtask

  task automatic expect_int(int m, int k, int frac, int v);
    checks++;
    if (coef_int(m, k, frac) != v) begin
      failures++;
      $display("FAIL coef_int(%0d,%0d,%0d) = %0d expected %0d", m, k, frac, coef_int(m, k, frac), v);
    end
  endtask

  initial begin
    compare(2, factor(0.61, 0.26));
    compare(3, pmul(factor(0.77, 0.28), factor(0.67, 0.0)));
    compare(4, pmul(factor(0.85, 0.25), factor(0.75, 0.088)));
    compare(1, pone());
    for (int m = 1; m <= 4; m++) begin
      checks++;
      if (coef_a(m, 0) != coef_a(m, 1)) failures++;
    end
    expect_int(2, 1, 8, 56);
    expect_int(2, 2, 8, 200);
    expect_int(2, 0, 8, 56);
    expect_int(1, 1, 8, 256);
    expect_int(3, 1, 10, 44);
    expect_int(3, 2, 10, 290);
    expect_int(3, 3, 10, 809);
    expect_int(4, 1, 13, 49);
    expect_int(4, 2, 13, 521);
    expect_int(4, 3, 13, 2501);
    expect_int(4, 4, 13, 6554);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
