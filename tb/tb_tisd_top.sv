// tb_tisd_top -- end-to-end test of the full design at its default sizes.
//
// The modulator path is fed as on the FPGA board: a new input sample every
// second clock (50 MS/s on a 100 MHz clock), here a sine of 0.5 full scale,
// held in between. Each clock the 4 output bits (q_par) are compared with a
// serial 2nd-order CIFB reference stepped 4 instants per clock, and every
// 20-bit serializer word is compared with the next 20 reference bits, bit 0
// first, one clock after its last group; words must come exactly every 5 clocks (4 bits x 5 = 20). The FIR
// example is fed two random samples per clock and checked against the direct
// form. Counted mechanisms, each of which must occur: samples taken, clocks
// with the input held, words emitted, +1 and -1 output bits.
module tb_tisd_top;
  import tb_cifb_ref_pkg::*;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [10:0] x = '0;
  logic [3:0] q_par;
  logic [19:0] ser_word;
  logic ser_valid, q_par_valid;
  logic signed [10:0] x_slot [4];
  logic signed [11:0] fir_x [2];
  logic signed [20:0] fir_y [2];

  tisd_top dut (.clk, .rst_n, .x_valid, .x, .x_slot, .q_par, .q_par_valid, .ser_word, .ser_valid, .fir_x, .fir_y);

  assign x_slot = '{default: '0};  // used only in the full-rate mode

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_samples = 0, n_holds = 0, n_words = 0, n_pos = 0, n_neg = 0;
  int last_word_cycle = -1;
  ref_state_t s;
  int bx;
  bit stream [$];
  int fh [$];

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  function automatic int direct(int xn, int xn1, int xn2);
    return 53 * xn - 37 * xn1 + 19 * xn2;
  endfunction

  initial begin
    fir_x[0] = '0;
    fir_x[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    s = '{0, 0};
    bx = 0;
    fh = '{0, 0};
    for (int i = 0; i < 40000; i++) begin
      logic v;
      int xv;
      logic [3:0] e;
      v  = (i % 2 == 0);
      xv = $rtoi(1023.0 * 0.5 * $sin(2.0 * 3.14159265 * real'(i / 2) / 1601.0));
      x_valid = v;
      x = 11'(xv);
      foreach (fir_x[k]) fir_x[k] = 12'($urandom);
      #1;
      for (int k = 0; k < 2; k++) begin
        fh.push_back(int'(fir_x[k]));
        checks++;
        if (int'(fir_y[k]) != direct(fh[$], fh[$-1], fh[$-2])) fail("fir");
      end
      void'(fh.pop_front());
      void'(fh.pop_front());
      @(negedge clk);
      cycle++;
      // the packer registers a word one clock after its last group is on q_par
      checks++;
      if (ser_valid !== (stream.size() == 20)) fail("ser_valid timing");
      if (ser_valid) begin
        logic [19:0] w;
        for (int k = 0; k < 20; k++) w[k] = stream[k];
        checks++;
        if (ser_word !== w) fail($sformatf("ser_word %h exp %h", ser_word, w));
        if (last_word_cycle >= 0) begin
          checks++;
          if (cycle - last_word_cycle != 5) fail("word spacing");
        end
        last_word_cycle = cycle;
        n_words++;
        stream.delete();
      end
      // reference for the edge just passed: 4 instants from the held input
      for (int k = 0; k < 4; k++) begin
        e[k] = out_bit(s);
        s    = next_state(s, bx);
        stream.push_back(e[k]);
        if (e[k]) n_pos++; else n_neg++;
      end
      if (v) begin
        bx = scale_in(xv, B1);
        n_samples++;
      end else n_holds++;
      checks++;
      if (q_par_valid !== 1'b1) fail("q_par_valid low");
      checks++;
      if (q_par !== e) fail($sformatf("q_par %b exp %b", q_par, e));
    end
    $display("samples=%0d holds=%0d words=%0d plus=%0d minus=%0d",
             n_samples, n_holds, n_words, n_pos, n_neg);
    checks++;
    if (n_samples == 0 || n_holds == 0 || n_words == 0 || n_pos == 0 || n_neg == 0)
      fail("a mechanism never occurred");
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
