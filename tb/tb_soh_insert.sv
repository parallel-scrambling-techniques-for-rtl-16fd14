// tb_soh_insert: self-checking testbench of the modified SOH insertion.
//
// Random AUG and SOH bits are offered on every lane in every clock. With an
// independent count of the lane position (9 rows x 270 bytes x 8 bits per
// frame) the testbench checks over more than one frame that each lane bit is
// taken from the SOH input in columns 0..8 of rows 1-3 and 5-9 and from the
// AUG input elsewhere, that aug_rd/soh_rd say which, and that frame_start,
// byte_last and the unscrambled flag (row 1, columns 0..8) are right.
module tb_soh_insert;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] aug_bit, soh_bit, lane_bit;
  logic aug_rd, soh_rd, frame_start, byte_last, unscrambled;

  soh_insert #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int soh_bits = 0, unscr_bits = 0;
  initial begin
    aug_bit = 0; soh_bit = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 19440 + 3000; k++) begin
      int lb, r, c;
      bit soh;
      lb = (k / 8) % 2430; r = lb / 270; c = lb % 270;
      soh = (c < 9) && (r != 3);
      aug_bit = N'($urandom);
      soh_bit = N'($urandom);
      #1;
      chk(lane_bit == (soh ? soh_bit : aug_bit), "lane bit source");
      chk(soh_rd == soh && aug_rd == !soh, "rd strobes");
      chk(unscrambled == (r == 0 && c < 9), "unscrambled");
      chk(frame_start == (k % 19440 == 0), "frame_start");
      chk(byte_last == (k % 8 == 7), "byte_last");
      soh_bits += soh; unscr_bits += unscrambled;
      @(negedge clk);
    end
    // per frame: 8 rows x 9 bytes SOH, 9 bytes unscrambled
    chk(soh_bits >= 8 * 9 * 8 && unscr_bits >= 9 * 8, "SOH and unscrambled regions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (19440 + 3100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
