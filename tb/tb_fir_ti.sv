// tb_fir_ti -- checks the two-slice FIR against the direct-form filter
// y[n] = a3*x[n] + a2*x[n-1] + a1*x[n-2] (a1 = 19, a2 = -37, a3 = 53),
// fed with two consecutive random samples per clock, and a three-slice copy
// likewise.
module tb_fir_ti;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] x2 [2];
  logic signed [20:0] y2 [2];
  logic signed [11:0] x3 [3];
  logic signed [20:0] y3 [3];
  int checks = 0, failures = 0;
  int h2 [$];
  int h3 [$];

  fir_ti dut2 (.clk, .rst_n, .x(x2), .y(y2));
  fir_ti #(.N(3)) dut3 (.clk, .rst_n, .x(x3), .y(y3));

  always #5 clk = ~clk;

  function automatic int direct(int xn, int xn1, int xn2);
    return 53 * xn - 37 * xn1 + 19 * xn2;
  endfunction

  initial begin
    foreach (x2[k]) x2[k] = '0;
    foreach (x3[k]) x3[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    h2 = '{0, 0};
    h3 = '{0, 0};
    for (int i = 0; i < 1000; i++) begin
      foreach (x2[k]) x2[k] = 12'($urandom);
      foreach (x3[k]) x3[k] = 12'($urandom);
      #1;
      for (int k = 0; k < 2; k++) begin
        h2.push_back(int'(x2[k]));
        checks++;
        if (int'(y2[k]) != direct(h2[$], h2[$-1], h2[$-2])) begin
          failures++;
          if (failures < 10) $display("FAIL N=2 slot %0d got %0d exp %0d", k, y2[k], direct(h2[$], h2[$-1], h2[$-2]));
        end
      end
      for (int k = 0; k < 3; k++) begin
        h3.push_back(int'(x3[k]));
        checks++;
        if (int'(y3[k]) != direct(h3[$], h3[$-1], h3[$-2])) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
