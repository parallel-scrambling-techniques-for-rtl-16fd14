// tb_soh_remove: self-checking testbench of the modified SOH removal.
//
// Random lane bits are offered with bit_valid low in about one clock in five.
// The first frame start is marked with bit_fs at an arbitrary point after
// reset, so the block must align to it. From then on the testbench counts lane
// positions itself and checks, one clock later, that each valid bit comes out
// as SOH (columns 0..8 of rows 1-3 and 5-9) or as AUG, unchanged, that aug_fs
// marks the first AUG bit of each frame, and (same clock) that unscrambled and
// frame_start flag the right positions.
module tb_soh_remove;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] lane_bit, aug_bit, soh_bit;
  logic bit_valid, bit_fs, frame_start, unscrambled, aug_valid, aug_fs, soh_valid;

  soh_remove #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int aug_fs_seen = 0;
  initial begin
    int p;
    bit pv, psoh, pfs;
    logic [N-1:0] pbit;
    lane_bit = 0; bit_valid = 0; bit_fs = 0;
    pv = 0; psoh = 0; pfs = 0; pbit = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (777) begin bit_valid = 1; lane_bit = N'($urandom); @(negedge clk); end
    p = 0;
    while (p < 19440 + 2000) begin
      int lb, r, c;
      bit soh;
      lb = (p / 8) % 2430; r = lb / 270; c = lb % 270;
      soh = (c < 9) && (r != 3);
      bit_valid = ($urandom % 5 != 0);
      bit_fs = bit_valid && (p % 19440 == 0);
      lane_bit = N'($urandom);
      #1;
      if (bit_valid) begin
        chk(unscrambled == (r == 0 && c < 9), "unscrambled flag");
        chk(frame_start == (p % 19440 == 0), "frame_start flag");
      end
      @(negedge clk);
      // outputs of the previous clock's bit
      chk(aug_valid == (bit_valid && !soh) && soh_valid == (bit_valid && soh), "split");
      if (bit_valid && !soh) chk(aug_bit == lane_bit, "aug bit");
      if (bit_valid && soh) chk(soh_bit == lane_bit, "soh bit");
      chk(aug_fs == (bit_valid && lb % 2430 == 9 && p % 8 == 0), "aug_fs");
      aug_fs_seen += aug_fs;
      if (bit_valid) p++;
    end
    chk(aug_fs_seen == 2, "one aug_fs per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
