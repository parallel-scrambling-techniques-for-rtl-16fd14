// tb_dss_par_scrambler: self-checking testbench of the parallel DSS scrambler.
//
// A serial x^31+x^28+1 SSRG (written independently here, started from the
// same register contents) gives the line-rate sequence s_n. Byte k of the
// stream occupies serial bits 8k..8k+7 (MSB first). Every non-HEC output byte
// must equal the input XOR s; the HEC byte must equal the CRC-8 of the four
// scrambled header bytes (computed here bit-serially) XOR 0x55, with
// s(n-211) added to bit 8 and s(n+1) to bit 7, n being the serial index of the
// HEC byte's first bit (Fig. 11). Output latency must be one clock.
module tb_dss_par_scrambler;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [63:0] SEED = 64'h2468_ACE1;
  localparam int CELLS = 60;
  localparam int NB = CELLS * 53;

  logic [7:0] in_byte, out_byte;
  logic cell_start, out_cell_start;
  logic [1:0] sample;

  dss_par_scrambler #(.SEED(SEED)) dut (.*);

  bit s [NB*8 + 16];
  task automatic gen();
    logic [30:0] d = SEED[30:0];
    for (int n = 0; n < NB*8 + 16; n++) begin
      bit fb;
      s[n] = d[30];
      fb = d[30] ^ d[27];
      d = {d[29:0], fb};
    end
  endtask

  function automatic logic [7:0] crc8(logic [7:0] b [4]);
    logic [7:0] r = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 7; j >= 0; j--) begin
        bit f = r[7] ^ b[i][j];
        r = {r[6:0], 1'b0} ^ (f ? 8'h07 : 8'h00);
      end
    return r;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] din [NB];
  logic [7:0] dout [NB];
  initial begin
    gen();
    for (int k = 0; k < NB; k++) din[k] = 8'($urandom);
    in_byte = 0; cell_start = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k <= NB; k++) begin
      if (k < NB) begin in_byte = din[k]; cell_start = (k % 53 == 0); end
      @(negedge clk);
      if (k < NB) begin
        dout[k] = out_byte;
        chk(out_cell_start == (k % 53 == 0), "out_cell_start one clock later");
      end
    end
    for (int k = 0; k < NB; k++) begin
      logic [7:0] e;
      for (int j = 0; j < 8; j++) e[7-j] = din[k][7-j] ^ s[8*k + j];
      if (k % 53 != 4) chk(dout[k] == e, "scrambled byte");
      else begin
        logic [7:0] h [4];
        for (int i = 0; i < 4; i++) h[i] = dout[k-4+i];
        e = crc8(h) ^ 8'h55;
        chk(dout[k][5:0] == e[5:0], "HEC bits 6..1");
        if (8*k >= 211) begin
          chk(dout[k][7] == (e[7] ^ s[8*k - 211]), "HEC8 carries s(t-211)");
          chk(dout[k][6] == (e[6] ^ s[8*k + 1]), "HEC7 carries s(t+1)");
        end
      end
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
