// soh_remove: modified SOH removal for byte-parallel descrambling (Fig. 7b).
//
// Mirror of soh_insert: it takes the N descrambled bit-serial lanes and splits
// each lane frame into SOH bits (columns 0..8 of rows 1-3 and 5-9) and AUG bits
// (everything else). It owns the receive frame timer, which is aligned by
// bit_fs, the first bit of a frame as marked by the demultiplexer, and it tells
// the descrambler where the unscrambled first 9N frame bytes are.
//
// Interface and timing: the flags frame_start/unscrambled are combinational
// for the present input bit; aug_bit/soh_bit are registered and valid one
// clock later with aug_valid/soh_valid; aug_fs marks the first AUG bit of a
// frame (row 1, column 9).
module soh_remove
  import scr_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] lane_bit,
  input  logic         bit_valid,
  input  logic         bit_fs,
  output logic         frame_start,
  output logic         unscrambled,
  output logic [N-1:0] aug_bit,
  output logic         aug_valid,
  output logic         aug_fs,
  output logic [N-1:0] soh_bit,
  output logic         soh_valid
);

  logic in_soh;
  logic first_aug_pending;

  stm_frame_timer u_timer (
    .clk, .rst_n, .en(bit_valid), .sync(bit_valid && bit_fs),
    .frame_start, .byte_first(), .byte_last(), .in_soh, .unscrambled
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aug_bit           <= '0;
      soh_bit           <= '0;
      aug_valid         <= 1'b0;
      soh_valid         <= 1'b0;
      aug_fs            <= 1'b0;
      first_aug_pending <= 1'b0;
    end else begin
      aug_valid <= bit_valid && !in_soh;
      soh_valid <= bit_valid && in_soh;
      aug_fs    <= 1'b0;
      if (bit_valid) begin
        if (in_soh) soh_bit <= lane_bit;
        else        aug_bit <= lane_bit;
        if (frame_start) first_aug_pending <= 1'b1;
        if (!in_soh && (first_aug_pending || frame_start)) begin
          aug_fs            <= 1'b1;
          first_aug_pending <= 1'b0;
        end
      end
    end
  end

endmodule
