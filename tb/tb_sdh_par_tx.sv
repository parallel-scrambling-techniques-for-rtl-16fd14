// tb_sdh_par_tx: self-checking testbench of the byte-parallel STM-N transmitter.
//
// The testbench feeds every lane from position-dependent pseudo-random AUG and
// SOH bits and rebuilds the expected line signal independently: the STM-N
// frame is assembled byte by byte (column c of the frame comes from lane c%N),
// and every byte after the first 9N is XORed with a serial x^7+x^6+1 SSRG that
// restarts from 1111111 at byte 9N+1, as a conventional serial scrambler at
// the line rate would do. Each line word must match, one word every 8 clocks,
// with line_fs on the first word of each frame. Also checks aug_rd/soh_rd.
module tb_sdh_par_tx #(
  parameter int unsigned N = 4,
  parameter int unsigned FRAMES = 2
);
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] aug_bit, soh_bit;
  logic aug_rd, soh_rd, line_valid, line_fs;
  logic [N-1:0][7:0] line_word;

  sdh_par_tx #(.N(N)) dut (.*);

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

  function automatic logic [7:0] exp_byte(int f, int q);  // q: frame byte index
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

  // drive sources from an independent position count
  int k = 0;
  always_comb begin
    int lb;
    lb = (k / 8) % 2430;
    for (int i = 0; i < N; i++) begin
      aug_bit[i] = src(k / 19440, lb / 270, lb % 270, i, k % 8, 0);
      soh_bit[i] = src(k / 19440, lb / 270, lb % 270, i, k % 8, 1);
    end
  end

  int words = 0, last_word_clk = -1, clkn = 0;
  always @(posedge clk) if (rst_n) k <= k + 1;
  always @(negedge clk) if (rst_n) begin
    int lb, f, wb;
    bit exp_soh;
    lb = (k / 8) % 2430;
    exp_soh = (lb % 270 < 9) && (lb / 270 != 3);
    chk(soh_rd == exp_soh && aug_rd == !exp_soh, "aug_rd/soh_rd");
    if (line_valid) begin
      f = words / 2430;
      wb = words % 2430;
      for (int i = 0; i < N; i++)
        chk(line_word[i] == exp_byte(f, wb * N + i), "line byte");
      chk(line_fs == (wb == 0), "line_fs");
      if (last_word_clk >= 0) chk(clkn - last_word_clk == 8, "one word per 8 clocks");
      last_word_clk = clkn;
      words++;
    end
    clkn++;
  end

  initial begin
    gen_serial();
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    #1 rst_n = 1;
    wait (words == FRAMES * 2430);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 19440 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
