// tb_fss_byte_scrambler: self-checking testbench of the (1,8) PSRG based
// byte-parallel frame synchronous scrambler (SDH-based ATM).
//
// For STM-1 and STM-4 frames of random bytes the output is compared with a
// serial x^7+x^6+1 scrambler written independently here: the first 9N bytes of
// a frame unchanged, then byte b XORed with serial bits 8(b-9N)..8(b-9N)+7,
// MSB first, the serial register restarting from 1111111 each frame. A second
// instance fed with the scrambled STM-1 stream must give back the input
// (descrambling); that instance builds its generator in the modular form, so
// the check also shows both generator forms agree. The stream starts in the middle of a frame and the first
// in_fs aligns the blocks; output latency must be one clock.
module tb_fss_byte_scrambler;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] in_byte, o1, o4, d1;
  logic in_fs1, in_fs4, v1, v4, fs1, fs4, dv, dfs;

  fss_byte_scrambler             u1 (.clk, .rst_n, .in_byte, .in_valid(1'b1), .in_fs(in_fs1),
                                     .out_byte(o1), .out_valid(v1), .out_fs(fs1));
  fss_byte_scrambler #(.STM_N(4)) u4 (.clk, .rst_n, .in_byte, .in_valid(1'b1), .in_fs(in_fs4),
                                     .out_byte(o4), .out_valid(v4), .out_fs(fs4));
  fss_byte_scrambler #(.MSRG(1))  ud (.clk, .rst_n, .in_byte(o1), .in_valid(v1), .in_fs(fs1),
                                     .out_byte(d1), .out_valid(dv), .out_fs(dfs));

  bit sser [127];
  task automatic gen();
    bit [6:0] d = 7'h7F;
    for (int n = 0; n < 127; n++) begin
      bit fb;
      sser[n] = d[6];
      fb = d[6] ^ d[5];
      d = {d[5:0], fb};
    end
  endtask

  function automatic logic [7:0] scr(logic [7:0] v, int b, int n);  // b: byte in frame
    logic [7:0] r = v;
    if (b >= 9 * n)
      for (int j = 0; j < 8; j++) r[7-j] ^= sser[((b - 9 * n) * 8 + j) % 127];
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int START = 2000;               // first byte sent, inside a frame
  localparam int NB = 3 * 9720 + 100;
  initial begin
    gen();
    in_byte = 0; in_fs1 = 0; in_fs4 = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = START; k < START + NB; k++) begin
      logic [7:0] prev_in;
      prev_in = in_byte;
      in_byte = 8'($urandom);
      in_fs1 = (k % 2430 == 0);
      in_fs4 = (k % 9720 == 0);
      @(negedge clk);
      // the outputs now show byte k
      if (k >= 9720) begin
        chk(v1 && v4, "out_valid");
        chk(o1 == scr(in_byte, k % 2430, 1), "STM-1 byte");
        chk(o4 == scr(in_byte, k % 9720, 4), "STM-4 byte");
        chk(fs1 == (k % 2430 == 0) && fs4 == (k % 9720 == 0), "out_fs");
      end
      if (k >= 9721) chk(dv && d1 == prev_in, "descrambled STM-1 byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
