// byte_interleave_demux: byte-interleaved demultiplexer of an STM-N word
// stream into N bit-serial lanes (Figs. 5b and 7b).
//
// A word of N bytes (byte 0 first on the line) is loaded when word_valid is
// high and shifted out MSB first over the following 8 clocks, byte i on lane
// i. Words are expected every 8 clocks; a word that arrives earlier replaces
// the one being shifted out.
//
// Interface and timing: the first bit of a word appears on lane_bit in the
// clock after word_valid, together with bit_valid and bit_first; bit_fs marks
// the first bit of a word that had word_fs set (the first bit of a frame).
module byte_interleave_demux #(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][7:0]   word,
  input  logic                word_valid,
  input  logic                word_fs,
  output logic [N-1:0]        lane_bit,
  output logic                bit_valid,
  output logic                bit_first,
  output logic                bit_fs
);

  logic [N-1:0][7:0] sh;
  logic [3:0]        left;   // bits still to be shifted out

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      left      <= '0;
      bit_first <= 1'b0;
      bit_fs    <= 1'b0;
    end else if (word_valid) begin
      sh        <= word;
      left      <= 4'd8;
      bit_first <= 1'b1;
      bit_fs    <= word_fs;
    end else begin
      for (int unsigned i = 0; i < N; i++) sh[i] <= {sh[i][6:0], 1'b0};
      if (left != 0) left <= left - 4'd1;
      bit_first <= 1'b0;
      bit_fs    <= 1'b0;
    end
  end

  always_comb for (int unsigned i = 0; i < N; i++) lane_bit[i] = sh[i][7];
  assign bit_valid = (left != 0);

endmodule
