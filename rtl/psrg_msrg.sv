// psrg_msrg: (M,N) parallel shift register generator, MSRG (modular)
// configuration.
//
// Produces the same N sequences T_0..T_{N-1} as psrg (the M-bit interleaving
// of them is the serial SSRG sequence of C(x) started from SEED), but from a
// modular shift register instead of a simple one, the second of the two
// realisations the method offers (the article's Figs. 8b and 9b, eq. 20b).
//
// How it works: a register w of M*L stages shifts towards its output stage
// w[ML-1], which carries T_0. The bit shifted out is fed back into stage 0
// and XORed into each stage j*M for which G(x) = x^L C(1/x) has x^j, i.e. the
// generating polynomial is G(x^M). Each other output T_i is an XOR of stages
// w[ML-1-jM]. The feedback mask, the output tap masks and the initial state
// are computed at elaboration by scr_pkg (msrg_gen, msrg_tap, msrg_init): a
// simple-register tap n is the output n steps ahead, which is a fixed linear
// function of w, and the initial state is the one whose first ML outputs are
// the first ML bits of T_0. For (8,4) with x^7+x^6+1 this gives
// T_0 = W_0, T_1 = W_8+W_16+W_32, T_2 = W_8+W_32, T_3 = W_0+W_8+W_24+W_48
// (W_i = w[ML-1-i]) and the initial state 11111110 11100100 00011100
// 10001101 11111100 11001000 11000110 from the output end; for (1,8) the
// initial state is 1000100.
//
// Interface and timing, as psrg without the correction input: load gives the
// initial state on the next clock (priority), adv steps the register, lane is
// combinational from the present state, state is the modular register. The
// reset state is the initial state. M*N must be a power of two and
// M*L at most 64. The taps were not read off the figures; they are derived
// and agree with them.
module psrg_msrg
  import scr_pkg::*;
#(
  parameter int unsigned L    = SDH_L,
  parameter w64_t        C    = SDH_C,
  parameter w64_t        SEED = SDH_SEED,
  parameter int unsigned M    = 8,
  parameter int unsigned N    = 4,
  localparam int unsigned W   = M * L
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          adv,
  output logic [N-1:0]  lane,
  output logic [W-1:0]  state
);

  localparam w64_t INIT = msrg_init(L, C, SEED, M, N);
  localparam w64_t FB   = msrg_gen(L, C, M);

  typedef logic [N-1:0][W-1:0] taps_t;
  function automatic taps_t all_taps();
    taps_t t;
    for (int unsigned i = 0; i < N; i++) t[i] = W'(msrg_tap(L, C, M, N, i));
    return t;
  endfunction
  localparam taps_t TAPS = all_taps();

  logic [W-1:0] w, w_next;

  // One modular step: shift up, the output stage's bit re-enters at every
  // feedback stage.
  always_comb begin
    w_next = w;
    if (load)     w_next = W'(INIT);
    else if (adv) w_next = {w[W-2:0], 1'b0} ^ (w[W-1] ? W'(FB) : '0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) w <= W'(INIT);
    else        w <= w_next;

  always_comb
    for (int unsigned i = 0; i < N; i++) lane[i] = ^(w & TAPS[i]);

  assign state = w;

  initial begin
    assert (((M * N) & (M * N - 1)) == 0)
      else $error("psrg_msrg: M*N must be a power of two");
    assert (W <= 64) else $error("psrg_msrg: M*L must not exceed 64");
  end

endmodule
