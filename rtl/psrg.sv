// psrg: (M,N) parallel shift register generator, SSRG configuration.
//
// Produces N parallel bit sequences T_0..T_{N-1} whose M-bit interleaving
// (M bits of T_0, then M bits of T_1, ..., then the next M bits of T_0, ...)
// is exactly the sequence of a serial SSRG of degree L with characteristic
// polynomial C(x) started from the register contents SEED. Each output runs
// at 1/N of the serial rate, so an N-lane scrambler built on it works at the
// base rate instead of the line rate.
//
// Structure (as in the article's Section II and its Figs. 8a, 9a, 12): a
// single SSRG of length M*L with characteristic polynomial C(x^M) generates
// T_0; every other output T_i is the XOR of the taps U_{jM} selected by the
// coefficients of x^{iMm} mod G(x) (G the reciprocal of C, m the inverse of MN
// modulo 2^L-1). Tap masks and the initial state are computed at elaboration
// by scr_pkg, and for (8,4) reproduce the article's eqs. (19b) and (20a).
// M*N must be a power of two (true for every configuration in the article);
// M*L must not exceed 64.
//
// Interface and timing: state register u (u[0] = output end of T_0).
//   load  : next state is the initial state (priority over everything else)
//   adv   : next state is one SSRG step of the present state
//   corr  : XORed into the next state together with adv (DSS correction);
//           ignored while load is high
//   lane  : combinational from the present state, lane[i] = T_i now
//   state : the present state, for sampling
// The reset state is the initial state.
module psrg
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
  input  logic [W-1:0]  corr,
  output logic [N-1:0]  lane,
  output logic [W-1:0]  state
);

  localparam w64_t INIT = psrg_init(L, C, SEED, M, N);

  typedef logic [N-1:0][W-1:0] taps_t;
  function automatic taps_t all_taps();
    taps_t t;
    for (int unsigned i = 0; i < N; i++) t[i] = W'(psrg_tap(L, C, M, N, i));
    return t;
  endfunction
  localparam taps_t TAPS = all_taps();

  logic [W-1:0] u, u_next;

  always_comb begin
    u_next = u;
    if (load)     u_next = W'(INIT);
    else if (adv) u_next = W'(psrg_step(64'(u), L, C, M)) ^ corr;
    else          u_next = u ^ corr;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) u <= W'(INIT);
    else        u <= u_next;

  always_comb
    for (int unsigned i = 0; i < N; i++) lane[i] = ^(u & TAPS[i]);

  assign state = u;

  initial begin
    assert (((M * N) & (M * N - 1)) == 0)
      else $error("psrg: M*N must be a power of two");
    assert (W <= 64) else $error("psrg: M*L must not exceed 64");
  end

endmodule
