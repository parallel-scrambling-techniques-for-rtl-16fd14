// dss_par_scrambler: byte-parallel distributed sample scrambler (DSS) for
// cell-based ATM transmission (Figs. 10-12, Section V).
//
// The serial cell-based DSS adds the sequence of an x^31+x^28+1 SSRG to the
// cell stream and, so that the descrambler can lock on without any frame
// reset, conveys two samples of that sequence in every cell: s(t-211) in HEC
// bit 8 and s(t+1) in HEC bit 7 (Fig. 11). Here the stream is treated as 8
// bit-interleaved lanes and scrambled a byte per clock with a (1,8) PSRG of
// length 31 (Fig. 12, state transition matrix of eq. (21)). In PSRG terms the
// two samples are t^5 27 bytes before the HEC byte and t^1 at the HEC byte.
// The first is obtained from the present state through the shifted sampling
// vector v0_hat = (T^-27)' v0 (eq. 23), so both samples are taken at the same
// clock from the same state (double sampling, one sample pair per cell,
// sampling interval alpha = 53 byte clocks).
//
// Cell format handling (the article does not detail it): header bytes 0-3
// and the 48 payload bytes are scrambled; the HEC byte is recomputed over the
// scrambled header (CRC-8, x^8+x^2+x+1, coset 0x55) and the two samples are
// added to its bits 8 (MSB) and 7. The incoming HEC byte is not used.
//
// Interface and timing: one byte per clock, cells back to back; cell_start
// marks byte 0 of a cell and aligns the byte counter (it also free-runs). The
// generator runs freely from its reset state SEED. Output registered, one clock
// of latency; out_cell_start follows cell_start.
module dss_par_scrambler
  import scr_pkg::*;
#(
  parameter w64_t        SEED = 64'h0000_0000_7FFF_FFFF,
  parameter int unsigned SAMPLE_SHIFT = 27  // bytes between the two samples
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       cell_start,
  output logic [7:0] out_byte,
  output logic       out_cell_start,
  output logic [1:0] sample          // samples added in the present HEC byte
);

  localparam w32_t V1    = w32_t'(psrg_tap(DSS_L, DSS_C, 1, 8, 1));
  localparam w32_t V0    = w32_t'(psrg_tap(DSS_L, DSS_C, 1, 8, 5));
  localparam w32_t V0HAT = dss_v0_hat(DSS_L, DSS_C, V0, SAMPLE_SHIFT);

  logic [5:0]  pos_q, pos;
  logic [7:0]  t, mask, scr, hec;
  logic [30:0] st;
  logic [7:0]  crc_q;

  assign pos = cell_start ? '0 : pos_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos_q <= '0;
    else        pos_q <= (32'(pos) == CELL_BYTES - 1) ? '0 : pos + 1'b1;

  psrg #(.L(DSS_L), .C(DSS_C), .SEED(SEED), .M(1), .N(8)) u_psrg (
    .clk, .rst_n, .load(1'b0), .adv(1'b1), .corr('0), .lane(t), .state(st)
  );

  always_comb begin
    for (int j = 0; j < 8; j++) mask[7-j] = t[j];
    scr       = in_byte ^ mask;
    sample[1] = ^(st & V0HAT[30:0]);   // s(t-211) = t^5 27 bytes ago
    sample[0] = ^(st & V1[30:0]);      // s(t+1)   = t^1 now
    hec       = crc_q ^ HEC_COSET ^ {sample, 6'b0};
  end

  // running CRC over the scrambled header bytes 0..3
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                      crc_q <= '0;
    else if (pos == 0)               crc_q <= crc8_byte(8'h00, scr);
    else if (32'(pos) < HEC_BYTE)    crc_q <= crc8_byte(crc_q, scr);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_byte       <= '0;
      out_cell_start <= 1'b0;
    end else begin
      out_byte       <= (32'(pos) == HEC_BYTE) ? hec : scr;
      out_cell_start <= (pos == 0);
    end

endmodule
