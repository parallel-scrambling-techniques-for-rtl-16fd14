// stm_frame_timer: bit/column/row position counter of one byte-interleaved
// STM-N lane.
//
// After byte interleaving of N lanes, lane byte c of row r lands in columns
// c*N .. c*N+N-1 of the STM-N frame, so a single lane of 9 rows x 270 bytes
// (the STM-1 frame size) describes the whole STM-N frame: lane columns 0..8
// carry the section overhead (SOH) in rows 1-3 and 5-9, and the first 9 lane
// bytes of row 1 form the first 9N frame bytes that are left unscrambled.
// Row 4 columns 0..8 belong to the AUG (the AU pointers), as drawn in Fig. 4.
//
// Interface and timing: the outputs describe the bit presented in the present
// clock. en advances the position by one bit. sync marks the present bit as
// the first bit of a frame (position row 0, column 0, bit 0) and overrides the
// stored position; the count then continues from there. Reset puts the
// position at the start of a frame. Bits are counted MSB first.
module stm_frame_timer
  import scr_pkg::*;
#(
  parameter int unsigned ROWS     = STM_ROWS,
  parameter int unsigned COLS     = STM_COLS,
  parameter int unsigned SOH_COLS = STM_SOH_COLS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic sync,
  output logic frame_start,  // first bit of a frame
  output logic byte_first,   // bit 0 (MSB) of a byte
  output logic byte_last,    // bit 7 (LSB) of a byte
  output logic in_soh,       // bit belongs to the SOH
  output logic unscrambled   // bit belongs to the first 9N frame bytes
);

  typedef struct packed {
    logic [$clog2(ROWS)-1:0] row;
    logic [$clog2(COLS)-1:0] col;
    logic [2:0]              bitn;
  } pos_t;

  pos_t pos_q, cur, nxt;

  always_comb begin
    cur = sync ? '0 : pos_q;
    nxt = cur;
    nxt.bitn = cur.bitn + 3'd1;
    if (cur.bitn == 3'd7) begin
      if (32'(cur.col) == COLS - 1) begin
        nxt.col = '0;
        nxt.row = (32'(cur.row) == ROWS - 1) ? '0 : cur.row + 1'b1;
      end else begin
        nxt.col = cur.col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pos_q <= '0;
    else if (en) pos_q <= nxt;

  assign frame_start = (cur == '0);
  assign byte_first  = (cur.bitn == 3'd0);
  assign byte_last   = (cur.bitn == 3'd7);
  assign in_soh      = (32'(cur.col) < SOH_COLS) && (cur.row != 3);
  assign unscrambled = (32'(cur.col) < SOH_COLS) && (cur.row == 0);

endmodule
