// tb_tisd_input_sh -- checks the input sample-and-hold: bx takes
// floor(GAIN*x/1024) on a clock with x_valid and keeps it, unchanged, on clocks
// without; reset clears it. Run with the sample-and-hold gain (56) and the
// zero-insertion gain for N = 4 (224).
module tb_tisd_input_sh;
  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [10:0] x = '0;
  logic signed [10:0] bx_a, bx_b;
  int checks = 0, failures = 0;
  int exp_a, exp_b, holds = 0, loads = 0;

  tisd_input_sh dut_a (.clk, .rst_n, .x_valid, .x, .bx(bx_a));
  tisd_input_sh #(.GAIN(224)) dut_b (.clk, .rst_n, .x_valid, .x, .bx(bx_b));

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (bx_a != 0 || bx_b != 0) failures++;
    rst_n = 1;
    exp_a = 0; exp_b = 0;
    for (int i = 0; i < 3000; i++) begin
      logic v;
      int xv;
      v  = ($urandom_range(0, 2) == 0);
      xv = int'($urandom_range(0, 2047)) - 1024;
      x_valid = v;
      x = 11'(xv);
      @(negedge clk);
      if (v) begin
        exp_a = (xv * 56) >>> 10;
        exp_b = (xv * 224) >>> 10;
        loads++;
      end else holds++;
      checks++;
      if (int'(bx_a) != exp_a || int'(bx_b) != exp_b) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d v=%b got %0d %0d exp %0d %0d", xv, v, bx_a, bx_b, exp_a, exp_b);
      end
    end
    checks++;
    if (holds == 0 || loads == 0) failures++;
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
