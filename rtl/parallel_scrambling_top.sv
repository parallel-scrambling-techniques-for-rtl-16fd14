// parallel_scrambling_top: the three parallel scrambling applications side by
// side, each with both link ends.
//
//  1. SDH STM-N (default STM-4): byte-parallel transmitter and receiver, each
//     with an (8,N) PSRG ahead of / behind the byte-interleaved (de)multiplexer
//     and running at the STM-1 bit rate (sdh_tx_* / sdh_rx_*).
//  2. SDH-based ATM (default STM-1): byte-wide frame synchronous scrambler and
//     descrambler on a (1,8) PSRG, running at the byte rate (atm_fss_*).
//  3. Cell-based ATM: byte-wide distributed sample scrambler and descrambler
//     on a 31-stage (1,8) PSRG, with double sampling and double correction
//     (dss_*).
//
// The transmitters build their parallel generators in the simple (SSRG)
// form and, by default (RX_MSRG = 1), the two frame synchronous receivers in
// the modular (MSRG) form. The method gives both forms; they produce the same
// sequences, and using one at each end shows that in every loop-back.
//
// The applications share only the clock and the asynchronous active-low
// reset. Each link end brings its line side out as ports, so a testbench (or a
// real line) connects transmitter and receiver. Timing of each port group is
// that of the block behind it: sdh_par_tx, sdh_par_rx, fss_byte_scrambler,
// dss_par_scrambler and dss_par_descrambler.
module parallel_scrambling_top #(
  parameter int unsigned SDH_N     = 4,
  parameter int unsigned ATM_STM_N = 1,
  parameter int unsigned DSS_BETA  = 1,
  parameter bit          RX_MSRG   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // SDH transmitter: AUG and SOH lanes in, line words out
  input  logic [SDH_N-1:0]        sdh_tx_aug_bit,
  input  logic [SDH_N-1:0]        sdh_tx_soh_bit,
  output logic                    sdh_tx_aug_rd,
  output logic                    sdh_tx_soh_rd,
  output logic [SDH_N-1:0][7:0]   sdh_tx_word,
  output logic                    sdh_tx_valid,
  output logic                    sdh_tx_fs,
  // SDH receiver: line words in, AUG and SOH lanes out
  input  logic [SDH_N-1:0][7:0]   sdh_rx_word,
  input  logic                    sdh_rx_valid,
  input  logic                    sdh_rx_fs,
  output logic [SDH_N-1:0]        sdh_rx_aug_bit,
  output logic                    sdh_rx_aug_valid,
  output logic                    sdh_rx_aug_fs,
  output logic [SDH_N-1:0]        sdh_rx_soh_bit,
  output logic                    sdh_rx_soh_valid,
  // SDH-based ATM: scrambler
  input  logic [7:0]              atm_fss_tx_in,
  input  logic                    atm_fss_tx_in_valid,
  input  logic                    atm_fss_tx_in_fs,
  output logic [7:0]              atm_fss_tx_out,
  output logic                    atm_fss_tx_out_valid,
  output logic                    atm_fss_tx_out_fs,
  // SDH-based ATM: descrambler
  input  logic [7:0]              atm_fss_rx_in,
  input  logic                    atm_fss_rx_in_valid,
  input  logic                    atm_fss_rx_in_fs,
  output logic [7:0]              atm_fss_rx_out,
  output logic                    atm_fss_rx_out_valid,
  output logic                    atm_fss_rx_out_fs,
  // cell-based ATM: DSS scrambler
  input  logic [7:0]              dss_tx_in,
  input  logic                    dss_tx_cell_start,
  output logic [7:0]              dss_tx_out,
  output logic                    dss_tx_out_cell_start,
  output logic [1:0]              dss_tx_sample,
  // cell-based ATM: DSS descrambler
  input  logic [7:0]              dss_rx_in,
  input  logic                    dss_rx_cell_start,
  output logic [7:0]              dss_rx_out,
  output logic                    dss_rx_out_cell_start,
  output logic                    dss_rx_locked,
  output logic                    dss_rx_corr_event
);

  sdh_par_tx #(.N(SDH_N)) u_sdh_tx (
    .clk, .rst_n,
    .aug_bit(sdh_tx_aug_bit), .soh_bit(sdh_tx_soh_bit),
    .aug_rd(sdh_tx_aug_rd), .soh_rd(sdh_tx_soh_rd),
    .line_word(sdh_tx_word), .line_valid(sdh_tx_valid), .line_fs(sdh_tx_fs)
  );

  sdh_par_rx #(.N(SDH_N), .MSRG(RX_MSRG)) u_sdh_rx (
    .clk, .rst_n,
    .line_word(sdh_rx_word), .line_valid(sdh_rx_valid), .line_fs(sdh_rx_fs),
    .aug_bit(sdh_rx_aug_bit), .aug_valid(sdh_rx_aug_valid), .aug_fs(sdh_rx_aug_fs),
    .soh_bit(sdh_rx_soh_bit), .soh_valid(sdh_rx_soh_valid)
  );

  fss_byte_scrambler #(.STM_N(ATM_STM_N)) u_atm_fss_tx (
    .clk, .rst_n,
    .in_byte(atm_fss_tx_in), .in_valid(atm_fss_tx_in_valid), .in_fs(atm_fss_tx_in_fs),
    .out_byte(atm_fss_tx_out), .out_valid(atm_fss_tx_out_valid), .out_fs(atm_fss_tx_out_fs)
  );

  fss_byte_scrambler #(.STM_N(ATM_STM_N), .MSRG(RX_MSRG)) u_atm_fss_rx (
    .clk, .rst_n,
    .in_byte(atm_fss_rx_in), .in_valid(atm_fss_rx_in_valid), .in_fs(atm_fss_rx_in_fs),
    .out_byte(atm_fss_rx_out), .out_valid(atm_fss_rx_out_valid), .out_fs(atm_fss_rx_out_fs)
  );

  dss_par_scrambler u_dss_tx (
    .clk, .rst_n,
    .in_byte(dss_tx_in), .cell_start(dss_tx_cell_start),
    .out_byte(dss_tx_out), .out_cell_start(dss_tx_out_cell_start), .sample(dss_tx_sample)
  );

  dss_par_descrambler #(.BETA(DSS_BETA)) u_dss_rx (
    .clk, .rst_n,
    .in_byte(dss_rx_in), .cell_start(dss_rx_cell_start),
    .out_byte(dss_rx_out), .out_cell_start(dss_rx_out_cell_start),
    .locked(dss_rx_locked), .corr_event(dss_rx_corr_event)
  );

endmodule
