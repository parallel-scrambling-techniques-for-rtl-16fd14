// byte_interleave_mux: byte-interleaved multiplexer of N bit-serial lanes
// (Figs. 5a and 7a).
//
// Each lane delivers one bit per clock, MSB first. After the eighth bit of a
// byte the mux emits one N-byte word: byte 0 of the word comes from lane 0 and
// is sent first on the line, then lane 1, and so on, which is the STM-N byte
// interleaving of N STM-1 rate signals. The line signal is given here as this
// word stream (one word every 8 clocks) rather than as a serial bit stream at
// N times the clock rate.
//
// Interface and timing: lane_bit is sampled every clock; byte_last marks the
// eighth bit of a byte and frame_start the first bit of a frame. word is
// registered: it is valid (word_valid) in the clock after byte_last, and
// word_fs marks the word holding the first N bytes of a frame.
module byte_interleave_mux #(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        lane_bit,
  input  logic                byte_last,
  input  logic                frame_start,
  output logic [N-1:0][7:0]   word,
  output logic                word_valid,
  output logic                word_fs
);

  logic [N-1:0][6:0] sh;
  logic              fs_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      word_fs    <= 1'b0;
      fs_seen    <= 1'b0;
    end else begin
      for (int unsigned i = 0; i < N; i++) sh[i] <= {sh[i][5:0], lane_bit[i]};
      if (frame_start) fs_seen <= 1'b1;
      word_valid <= byte_last;
      if (byte_last) begin
        for (int unsigned i = 0; i < N; i++) word[i] <= {sh[i], lane_bit[i]};
        word_fs <= fs_seen || frame_start;
        fs_seen <= 1'b0;
      end
    end
  end

endmodule
