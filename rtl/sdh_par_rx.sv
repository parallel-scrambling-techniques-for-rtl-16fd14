// sdh_par_rx: STM-N receiver with a byte-parallel frame synchronous
// descrambler (Fig. 7b).
//
// Mirror of sdh_par_tx: the line word stream is byte-deinterleaved into N
// STM-1 rate lanes, each lane is descrambled by its (8,N) PSRG output T_i
// (the same generator as in the transmitter, since the scrambler is additive),
// and the modified SOH removal splits each lane into SOH and AUG bits.
//
//   line words -> byte-interleaved demux -> XOR T_i -> SOH removal (per lane)
//
// Frame alignment (finding A1/A2) is outside this block: line_fs must mark the
// word carrying the first N bytes of a frame. The PSRG is reloaded during the
// first 9 lane bytes of every frame. MSRG selects the modular form of the
// (8,N) generator instead of the simple one; both give the same T_i, so the
// receiver works with either whatever the transmitter uses.
//
// Interface and timing: one N-byte word every 8 clocks in; one bit per lane
// per clock out, aug_bit with aug_valid and soh_bit with soh_valid, 2 clocks
// after the bit's word was accepted (1 clock in the demux, 1 in SOH removal).
module sdh_par_rx
  import scr_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter bit          MSRG = 1'b0   // 1: modular form of the generator (Fig. 8b)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][7:0]   line_word,
  input  logic                line_valid,
  input  logic                line_fs,
  output logic [N-1:0]        aug_bit,
  output logic                aug_valid,
  output logic                aug_fs,
  output logic [N-1:0]        soh_bit,
  output logic                soh_valid
);

  logic [N-1:0] lane_bit, t, dsc_bit;
  logic         bit_valid, bit_fs;
  logic         unscrambled;

  byte_interleave_demux #(.N(N)) u_demux (
    .clk, .rst_n, .word(line_word), .word_valid(line_valid), .word_fs(line_fs),
    .lane_bit, .bit_valid, .bit_first(), .bit_fs
  );

  if (MSRG) begin : g_msrg
    psrg_msrg #(.L(SDH_L), .C(SDH_C), .SEED(SDH_SEED), .M(8), .N(N)) u_psrg (
      .clk, .rst_n, .load(bit_valid && unscrambled), .adv(bit_valid),
      .lane(t), .state()
    );
  end else begin : g_ssrg
    psrg #(.L(SDH_L), .C(SDH_C), .SEED(SDH_SEED), .M(8), .N(N)) u_psrg (
      .clk, .rst_n, .load(bit_valid && unscrambled), .adv(bit_valid), .corr('0),
      .lane(t), .state()
    );
  end

  assign dsc_bit = unscrambled ? lane_bit : (lane_bit ^ t);

  soh_remove #(.N(N)) u_soh (
    .clk, .rst_n, .lane_bit(dsc_bit), .bit_valid, .bit_fs,
    .frame_start(), .unscrambled, .aug_bit, .aug_valid, .aug_fs, .soh_bit, .soh_valid
  );

endmodule
