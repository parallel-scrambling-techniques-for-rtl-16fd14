// tb_byte_interleave_mux: self-checking testbench of the byte-interleaved
// multiplexer.
//
// N random bit-serial lanes are fed MSB first, byte_last on every eighth bit
// and frame_start on the first bit of every 40th byte. Every eighth clock the
// word must hold the N bytes just completed (lane 0 in byte 0), become valid
// exactly one clock after byte_last, and carry word_fs for the frame's first
// byte.
module tb_byte_interleave_mux;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] lane_bit;
  logic byte_last, frame_start, word_valid, word_fs;
  logic [N-1:0][7:0] word;

  byte_interleave_mux #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [N-1:0][7:0] cur;
  bit exp_valid, fs_of_byte;
  int words = 0;
  initial begin
    lane_bit = 0; byte_last = 0; frame_start = 0;
    exp_valid = 0; fs_of_byte = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8 * 200; k++) begin
      lane_bit = N'($urandom);
      byte_last = (k % 8 == 7);
      frame_start = (k % 320 == 0);
      if (k % 8 == 0) fs_of_byte = frame_start;
      for (int i = 0; i < N; i++) cur[i][7 - k % 8] = lane_bit[i];
      @(negedge clk);
      exp_valid = (k % 8 == 7);
      chk(word_valid == exp_valid, "word_valid timing");
      if (exp_valid) begin
        chk(word == cur, "word contents");
        chk(word_fs == fs_of_byte, "word_fs");
        words++;
      end
    end
    chk(words == 200, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * 200 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
