// fss_byte_scrambler: byte-parallel frame synchronous scrambler for SDH-based
// ATM transmission, built on a (1,8) PSRG (Fig. 9a).
//
// An STM-1 or STM-4 signal carrying ATM cells has no byte-interleaved
// multiplexer to parallelise around, so the serial bit stream is instead
// viewed as 8 bit-interleaved lanes: bit j of every byte (j = 0 the first sent
// bit, the MSB) is scrambled by PSRG output T_j. The scrambler then runs at
// the byte rate (19.44 MHz for STM-1, 77.76 MHz for STM-4) and reproduces the
// serial x^7+x^6+1 frame synchronous scrambler exactly: the first 9N bytes of
// each frame pass unscrambled, and the generator restarts from its initial
// state (1000101, derived from 1111111) at byte 9N+1. The same block
// descrambles, because the scrambling is a plain XOR. MSRG selects which of
// the two equivalent generator forms is built (simple, 1000101, Fig. 9a, or
// modular, 1000100, Fig. 9b); the output is the same.
//
// Interface and timing: one byte per clock while in_valid; in_fs marks the
// first byte of a frame and aligns the frame byte counter (the counter also
// free-runs from reset). The output is registered: out_byte/out_valid/out_fs
// follow the input by one clock.
module fss_byte_scrambler
  import scr_pkg::*;
#(
  parameter int unsigned STM_N = 1,
  parameter bit          MSRG  = 1'b0   // 1: modular form of the generator (Fig. 9b)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       in_valid,
  input  logic       in_fs,
  output logic [7:0] out_byte,
  output logic       out_valid,
  output logic       out_fs
);

  localparam int unsigned FRAME_BYTES = STM_ROWS * STM_COLS * STM_N;
  localparam int unsigned UNSCR_BYTES = STM_SOH_COLS * STM_N;
  localparam int unsigned CW = $clog2(FRAME_BYTES);

  logic [CW-1:0] pos_q, pos;
  logic          unscrambled;
  logic [7:0]    t;

  assign pos         = in_fs ? '0 : pos_q;
  assign unscrambled = 32'(pos) < UNSCR_BYTES;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        pos_q <= '0;
    else if (in_valid) pos_q <= (32'(pos) == FRAME_BYTES - 1) ? '0 : pos + 1'b1;

  if (MSRG) begin : g_msrg
    psrg_msrg #(.L(SDH_L), .C(SDH_C), .SEED(SDH_SEED), .M(1), .N(8)) u_psrg (
      .clk, .rst_n, .load(in_valid && unscrambled), .adv(in_valid),
      .lane(t), .state()
    );
  end else begin : g_ssrg
    psrg #(.L(SDH_L), .C(SDH_C), .SEED(SDH_SEED), .M(1), .N(8)) u_psrg (
      .clk, .rst_n, .load(in_valid && unscrambled), .adv(in_valid), .corr('0),
      .lane(t), .state()
    );
  end

  logic [7:0] mask;
  always_comb for (int j = 0; j < 8; j++) mask[7-j] = t[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_byte  <= '0;
      out_valid <= 1'b0;
      out_fs    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_fs    <= in_valid && in_fs;
      if (in_valid) out_byte <= unscrambled ? in_byte : (in_byte ^ mask);
    end
  end

endmodule
