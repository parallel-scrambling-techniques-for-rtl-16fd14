// dss_par_descrambler: byte-parallel DSS descrambler with double sampling and
// double correction (Section III, Fig. 3).
//
// The descrambler runs its own copy of the 31-stage (1,8) PSRG, which starts
// in an arbitrary state. In every cell it recovers the two scrambler samples
// from HEC bits 8 and 7 (received HEC XOR the CRC-8 of the received header
// XOR 0x55) and takes the same two samples from its own state with the
// sampling vectors v0_hat and v1. Any difference is a linear function of the
// state error; BETA byte clocks after the sampling time the state is corrected
// by adding diff0*c0 + diff1*c1 (eq. 12-14). With the correction vectors of
// eq. (18), computed at elaboration from T, alpha = 53, J = 16 and BETA, the
// correction matrix Lambda is zero, so from any starting state the descrambler
// state equals the scrambler state after at most J = 16 cells (without line
// errors) and stays equal.
//
// The descrambled cell has its HEC byte rebuilt over the descrambled header.
// sync counts consecutive cells whose sample pair agreed; locked is high after
// LOCK_CELLS such cells. corr_event pulses when a nonzero correction is added.
//
// Interface and timing: one byte per clock, cells back to back, cell_start on
// byte 0 (cell delineation is outside this block). Output registered, one
// clock of latency.
module dss_par_descrambler
  import scr_pkg::*;
#(
  parameter w64_t        SEED = 64'h0000_0000_1234_5678,
  parameter int unsigned SAMPLE_SHIFT = 27,
  parameter int unsigned BETA = 1,          // correction delay, 1..53
  parameter bit          U_SEL = 1'b0,      // the free binary u of eq. (18)
  parameter int unsigned LOCK_CELLS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_byte,
  input  logic       cell_start,
  output logic [7:0] out_byte,
  output logic       out_cell_start,
  output logic       locked,
  output logic       corr_event
);

  localparam int unsigned ALPHA = CELL_BYTES;
  localparam w32_t V1    = w32_t'(psrg_tap(DSS_L, DSS_C, 1, 8, 1));
  localparam w32_t V0    = w32_t'(psrg_tap(DSS_L, DSS_C, 1, 8, 5));
  localparam w32_t V0HAT = dss_v0_hat(DSS_L, DSS_C, V0, SAMPLE_SHIFT);
  localparam w32_t C0    = dss_corr_vec(DSS_L, DSS_C, V0HAT, V1, ALPHA, BETA, U_SEL, 0);
  localparam w32_t C1    = dss_corr_vec(DSS_L, DSS_C, V0HAT, V1, ALPHA, BETA, U_SEL, 1);

  logic [5:0]  pos_q, pos;
  logic [7:0]  t, mask, dsc, crc_rx_q, crc_dsc_q;
  logic [30:0] st, corr;
  logic [1:0]  rx_sample, my_sample, diff, pend_diff;
  logic [5:0]  pend_cnt;   // clocks until the pending correction is added
  logic        is_hec;
  logic [$clog2(LOCK_CELLS+1)-1:0] good_cells;

  assign pos    = cell_start ? '0 : pos_q;
  assign is_hec = (32'(pos) == HEC_BYTE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos_q <= '0;
    else        pos_q <= (32'(pos) == CELL_BYTES - 1) ? '0 : pos + 1'b1;

  always_comb begin
    for (int j = 0; j < 8; j++) mask[7-j] = t[j];
    dsc          = in_byte ^ mask;
    rx_sample    = in_byte[7:6] ^ crc_rx_q[7:6] ^ HEC_COSET[7:6];
    my_sample[1] = ^(st & V0HAT[30:0]);
    my_sample[0] = ^(st & V1[30:0]);
    diff         = rx_sample ^ my_sample;
  end

  // Correction: added with the state step that produces the state of sampling
  // time + BETA. For BETA = 1 that is the step right after the HEC byte.
  always_comb begin
    logic [1:0] d;
    logic       fire;
    if (BETA == 1) begin
      fire = is_hec;
      d    = diff;
    end else begin
      fire = (pend_cnt == 6'd1);
      d    = pend_diff;
    end
    corr = '0;
    if (fire && d[1]) corr ^= C0[30:0];
    if (fire && d[0]) corr ^= C1[30:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pend_cnt  <= '0;
      pend_diff <= '0;
    end else begin
      if (pend_cnt != 0) pend_cnt <= pend_cnt - 1'b1;
      if (is_hec && BETA > 1) begin
        pend_cnt  <= 6'(BETA - 1);
        pend_diff <= diff;
      end
    end

  psrg #(.L(DSS_L), .C(DSS_C), .SEED(SEED), .M(1), .N(8)) u_psrg (
    .clk, .rst_n, .load(1'b0), .adv(1'b1), .corr, .lane(t), .state(st)
  );

  // CRC-8 of the received and of the descrambled header bytes 0..3
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      crc_rx_q  <= '0;
      crc_dsc_q <= '0;
    end else if (pos == 0) begin
      crc_rx_q  <= crc8_byte(8'h00, in_byte);
      crc_dsc_q <= crc8_byte(8'h00, dsc);
    end else if (32'(pos) < HEC_BYTE) begin
      crc_rx_q  <= crc8_byte(crc_rx_q, in_byte);
      crc_dsc_q <= crc8_byte(crc_dsc_q, dsc);
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_byte       <= '0;
      out_cell_start <= 1'b0;
      good_cells     <= '0;
      corr_event     <= 1'b0;
    end else begin
      out_byte       <= is_hec ? (crc_dsc_q ^ HEC_COSET) : dsc;
      out_cell_start <= (pos == 0);
      corr_event     <= |corr;
      if (is_hec) begin
        if (diff != 0)                          good_cells <= '0;
        else if (32'(good_cells) < LOCK_CELLS)  good_cells <= good_cells + 1'b1;
      end
    end

  assign locked = (32'(good_cells) == LOCK_CELLS);

  initial assert (BETA >= 1 && BETA <= ALPHA) else $error("BETA must be 1..53");

endmodule
