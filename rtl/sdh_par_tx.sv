// sdh_par_tx: STM-N transmitter with a byte-parallel frame synchronous
// scrambler (Fig. 7a).
//
// The serial SDH scrambler (x^7+x^6+1, reset to 1111111 after the first 9N
// bytes of each frame) would have to run at the STM-N line rate. Here the
// scrambling is moved in front of the byte-interleaved multiplexer: each of
// the N AUG lanes is scrambled at the STM-1 rate by its own output T_i of an
// (8,N) PSRG, chosen so that after byte interleaving the line signal is
// bit-for-bit the one the serial scrambler would produce.
//
//   AUG lanes -> SOH insertion (per lane) -> XOR T_i -> byte-interleaved mux
//
// The PSRG is held at its initial state while the first 9 bytes of each lane
// frame (the first 9N bytes of the STM-N frame) pass unscrambled, and runs one
// step per lane bit afterwards.
//
// Interface and timing: one bit per lane per clock in (aug_bit, soh_bit,
// consumed as aug_rd / soh_rd say), one N-byte line word every 8 clocks out
// (line_word[0] is sent first); line_fs marks the first word of a frame. The
// first frame starts at reset. Latency from a lane bit to its line word is at
// most 8 clocks (the word is registered after the byte's last bit).
module sdh_par_tx
  import scr_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        aug_bit,
  input  logic [N-1:0]        soh_bit,
  output logic                aug_rd,
  output logic                soh_rd,
  output logic [N-1:0][7:0]   line_word,
  output logic                line_valid,
  output logic                line_fs
);

  logic [N-1:0] lane_bit, t, scr_bit;
  logic         frame_start, byte_last, unscrambled;

  soh_insert #(.N(N)) u_soh (
    .clk, .rst_n, .aug_bit, .soh_bit, .aug_rd, .soh_rd,
    .lane_bit, .frame_start, .byte_last, .unscrambled
  );

  psrg #(.L(SDH_L), .C(SDH_C), .SEED(SDH_SEED), .M(8), .N(N)) u_psrg (
    .clk, .rst_n, .load(unscrambled), .adv(1'b1), .corr('0),
    .lane(t), .state()
  );

  assign scr_bit = unscrambled ? lane_bit : (lane_bit ^ t);

  byte_interleave_mux #(.N(N)) u_mux (
    .clk, .rst_n, .lane_bit(scr_bit), .byte_last, .frame_start,
    .word(line_word), .word_valid(line_valid), .word_fs(line_fs)
  );

endmodule
