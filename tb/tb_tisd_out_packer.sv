// tb_tisd_out_packer -- checks the 20-bit word packer with 4-bit groups: a word
// every 5 groups, bit 0 the earliest bit, word_valid one clock wide, groups
// without in_valid skipped. A 2-bit-group copy (10 groups per word) runs beside.
module tb_tisd_out_packer;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0] q4 = '0;
  logic [19:0] w4, w2;
  logic wv4, wv2;
  int checks = 0, failures = 0;

  tisd_out_packer dut4 (.clk, .rst_n, .in_valid, .q(q4), .word(w4), .word_valid(wv4));
  tisd_out_packer #(.N(2)) dut2 (.clk, .rst_n, .in_valid, .q(q4[1:0]), .word(w2), .word_valid(wv2));

  always #5 clk = ~clk;

  bit stream4 [$];
  bit stream2 [$];
  int words4 = 0, words2 = 0, last_word4_cycle = -1, cycle = 0, skipped = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic v;
      logic [3:0] g;
      v = ($urandom_range(0, 4) != 0);
      g = 4'($urandom);
      in_valid = v;
      q4 = g;
      @(negedge clk);
      cycle++;
      if (v) begin
        for (int k = 0; k < 4; k++) stream4.push_back(g[k]);
        for (int k = 0; k < 2; k++) stream2.push_back(g[k]);
      end else skipped++;
      // word_valid must appear exactly when 20 bits are queued
      checks++;
      if (wv4 !== (stream4.size() == 20)) begin
        failures++;
        if (failures < 10) $display("FAIL wv4=%b queued=%0d cycle %0d", wv4, stream4.size(), cycle);
      end
      if (stream4.size() == 20) begin
        logic [19:0] e;
        for (int k = 0; k < 20; k++) e[k] = stream4[k];
        stream4.delete();
        words4++;
        checks++;
        if (w4 !== e) begin
          failures++;
          if (failures < 10) $display("FAIL word4 %h exp %h", w4, e);
        end
      end
      checks++;
      if (wv2 !== (stream2.size() == 20)) failures++;
      if (stream2.size() == 20) begin
        logic [19:0] e;
        for (int k = 0; k < 20; k++) e[k] = stream2[k];
        stream2.delete();
        words2++;
        checks++;
        if (w2 !== e) failures++;
      end
    end
    checks++;
    if (words4 < 50 || words2 < 50 || skipped == 0) failures++;
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
