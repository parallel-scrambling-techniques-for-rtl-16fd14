// tb_byte_interleave_demux: self-checking testbench of the byte-interleaved
// demultiplexer.
//
// Random N-byte words arrive every 8 clocks (one word every 40 with word_fs).
// In the 8 clocks after a word, lane i must carry byte i MSB first, with
// bit_valid high, bit_first on the first bit and bit_fs on the first bit of a
// word_fs word. After the last word bit_valid must drop.
module tb_byte_interleave_demux;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][7:0] word, held;
  logic word_valid, word_fs, bit_valid, bit_first, bit_fs, held_fs;
  logic [N-1:0] lane_bit;

  byte_interleave_demux #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    word = 0; word_valid = 0; word_fs = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      for (int i = 0; i < N; i++) word[i] = 8'($urandom);
      word_valid = 1;
      word_fs = (w % 40 == 0);
      held = word; held_fs = word_fs;
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        word_valid = 0; word_fs = 0;
        chk(bit_valid, "bit_valid");
        chk(bit_first == (b == 0), "bit_first");
        chk(bit_fs == (b == 0 && held_fs), "bit_fs");
        for (int i = 0; i < N; i++) chk(lane_bit[i] == held[i][7-b], "lane bit");
      end
    end
    @(negedge clk);
    chk(!bit_valid, "bit_valid drops after the last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
