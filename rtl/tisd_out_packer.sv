// tisd_out_packer -- gathers the modulator's N-bit output groups into words for
// a parallel-to-serial transmitter.
//
// Each clock the modulator delivers N output bits, q[0] the earliest. A
// serializer that takes SER_W-bit words (20 bits for the transceiver used on
// the FPGA) needs one word every SER_W/N clocks. This block shifts the groups in
// and presents a full word with a one-clock word_valid pulse. The earliest bit
// of a word is bit 0, so a serializer that sends the least significant bit first
// reproduces the output stream in time order; that bit order, and SER_W being a
// multiple of N, are this design's choices.
//
// Timing: the group seen with in_valid on the edge that completes a word is in
// that word, which is on word/word_valid after that edge. Synchronous
// active-low reset empties the word.
module tisd_out_packer #(
  parameter int N     = 4,   // bits per input group
  parameter int SER_W = 20   // serializer word width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [N-1:0]       q,
  output logic [SER_W-1:0]   word,
  output logic               word_valid
);

  localparam int GROUPS = SER_W / N;
  localparam int CW     = $clog2(GROUPS + 1);

  if (SER_W % N != 0) begin : g_chk
    $error("SER_W must be a multiple of N");
  end

  logic [CW-1:0]    cnt;
  logic [SER_W-1:0] shreg_next;  // the word if this group completes it

  // The earlier groups of the word wait in shreg; a new group enters at the
  // top, so after GROUPS groups the first one sits at bit 0.
  if (GROUPS == 1) begin : g_one
    assign shreg_next = q;
  end else begin : g_shift
    logic [SER_W-N-1:0] shreg;
    assign shreg_next = {q, shreg};
    always_ff @(posedge clk) begin
      if (!rst_n)        shreg <= '0;
      else if (in_valid) shreg <= shreg_next[SER_W-1:N];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(GROUPS - 1)) begin
          cnt        <= '0;
          word       <= shreg_next;
          word_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
