// soh_insert: modified SOH insertion for byte-parallel scrambling (Fig. 7a).
//
// In the parallel transmitter the SOH is inserted into each of the N AUG lanes
// before scrambling, instead of into the multiplexed STM-N signal. Each lane
// is bit serial at the STM-1 rate (one bit per clock, MSB of each byte first).
// Within a lane frame of 9 rows x 270 bytes, columns 0..8 of rows 1-3 and 5-9
// are taken from soh_bit, all other bytes from aug_bit; after byte
// interleaving this places the 9N SOH columns of the STM-N frame correctly.
// The block owns the frame timer and tells the scrambler where the first 9N
// frame bytes (left unscrambled) are.
//
// Interface and timing: combinational from inputs to lane_bit; one lane bit
// per clock. aug_rd / soh_rd say in the same clock which source is consumed,
// so an upstream source advances on them. The frame starts after reset.
module soh_insert
  import scr_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] aug_bit,
  input  logic [N-1:0] soh_bit,
  output logic         aug_rd,
  output logic         soh_rd,
  output logic [N-1:0] lane_bit,
  output logic         frame_start,
  output logic         byte_last,
  output logic         unscrambled
);

  logic in_soh;

  stm_frame_timer u_timer (
    .clk, .rst_n, .en(1'b1), .sync(1'b0),
    .frame_start, .byte_first(), .byte_last, .in_soh, .unscrambled
  );

  assign soh_rd   = in_soh;
  assign aug_rd   = !in_soh;
  assign lane_bit = in_soh ? soh_bit : aug_bit;

  // The unscrambled bytes are a subset of the SOH. (Using the asynchronous
  // reset in the assertion's disable condition makes the linter report rst_n
  // as used both synchronously and asynchronously; it is checking logic only,
  // no flip-flop is built from it.)
  assert property (@(posedge clk) disable iff (!rst_n) unscrambled |-> in_soh);

endmodule
