// tb_sdh_par_rx: self-checking testbench of the byte-parallel STM-N receiver.
//
// The line signal is built independently in the testbench: STM-N frames whose
// column c comes from lane c%N, scrambled after the first 9N bytes by a serial
// x^7+x^6+1 SSRG restarting from 1111111 (the conventional line-rate
// scrambler). It is fed as one N-byte word every 8 clocks, starting in the
// middle of a frame, so the receiver first has to align on line_fs. From the
// first frame start on, every AUG and SOH bit of every lane must come out
// equal to the bit that was put into the frame, in frame order. MSRG chooses
// the receiver's generator form (default: modular, as at the top level; the
// simple form is the transmitter's and is checked there).
module tb_sdh_par_rx #(
  parameter int unsigned N = 4,
  parameter int unsigned FRAMES = 2,
  parameter bit          MSRG = 1'b1
);
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][7:0] line_word;
  logic line_valid = 0, line_fs = 0;
  logic [N-1:0] aug_bit, soh_bit;
  logic aug_valid, aug_fs, soh_valid;

  sdh_par_rx #(.N(N), .MSRG(MSRG)) dut (.*);

  function automatic bit src(int f, int r, int c, int lane, int b, bit soh);
    int unsigned h = (f * 7919 + r * 271 + c * 31 + lane * 17 + b * 3 + (soh ? 101 : 0)) * 32'd2654435761;
    return h[17];
  endfunction

  bit sser [127];
  task automatic gen_serial();
    bit [6:0] d = 7'h7F;
    for (int n = 0; n < 127; n++) begin
      bit fb;
      sser[n] = d[6];
      fb = d[6] ^ d[5];
      d = {d[5:0], fb};
    end
  endtask

  function automatic logic [7:0] line_byte(int f, int q);
    int r = q / (270 * N);
    int col = q % (270 * N);
    int lane = col % N;
    int c = col / N;
    bit soh = (c < 9) && (r != 3);
    logic [7:0] v;
    for (int b = 0; b < 8; b++) begin
      v[7-b] = src(f, r, c, lane, b, soh);
      if (q >= 9 * N) v[7-b] ^= sser[((q - 9 * N) * 8 + b) % 127];
    end
    return v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // output checker: p counts lane bit positions from the first frame start
  int p = -1;
  bit fs_sent = 0;   // the receiver may only be trusted after the first line_fs
  int frames_done = 0;
  always @(negedge clk) if (rst_n && (aug_valid || soh_valid)) begin
    int lb, f, r, c, b;
    bit soh;
    if (p < 0 && aug_fs && fs_sent) p = 72;
    if (p >= 0) begin
      lb = (p / 8) % 2430; f = p / 19440; r = lb / 270; c = lb % 270; b = p % 8;
      soh = (c < 9) && (r != 3);
      chk(soh_valid == soh && aug_valid == !soh, "aug/soh split");
      chk(aug_fs == (lb == 9 && b == 0), "aug_fs");
      for (int i = 0; i < N; i++)
        chk((soh ? soh_bit[i] : aug_bit[i]) == src(f, r, c, i, b, soh), "lane bit");
      p++;
      if (p % 19440 == 0) frames_done++;
    end
  end

  localparam int W0 = 1000;   // first word sent: inside frame "-1"
  initial begin
    gen_serial();
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = W0; w < (FRAMES + 1) * 2430 + 4; w++) begin
      int f, wb;
      f = w / 2430 - 1;
      wb = w % 2430;
      @(negedge clk);
      for (int i = 0; i < N; i++) line_word[i] = line_byte(f, wb * N + i);
      line_valid = 1;
      line_fs = (wb == 0);
      if (wb == 0) fs_sent = 1;
      @(negedge clk);
      line_valid = 0;
      line_fs = 0;
      repeat (6) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    if (frames_done < FRAMES) begin failures++; $display("FAIL only %0d frames", frames_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((FRAMES + 1) * 19440 + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
