// tb_psrg: self-checking testbench of the (M,N) parallel shift register generator.
//
// Three generators are checked against a serial reference SSRG written
// independently here (a plain L-bit shift register with characteristic
// polynomial C(x)): lane i at base clock k must equal serial bit
// s[(k/M)*MN + i*M + k%M] (M-bit interleaving).
//   (8,4)  for C = x^7+x^6+1, reset 1111111 (STM-4 scrambler)
//   (8,16) for the same polynomial (STM-16 scrambler)
//   (1,8)  for C = x^31+x^28+1 (cell based ATM DSS)
// It also compares the (8,4) and (1,8) initial states with the register
// contents printed in the article's figures, exercises a reload in the middle
// of a run, and checks that the generators deliver one bit per lane per clock.
module tb_psrg;
  import scr_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic load;
  logic [3:0]  l84;  logic [55:0] s84;
  logic [15:0] l816; logic [55:0] s816;
  logic [7:0]  ld;   logic [30:0] sd;

  psrg #(.M(8), .N(4))  u84  (.clk, .rst_n, .load, .adv(1'b1), .corr('0), .lane(l84),  .state(s84));
  psrg #(.M(8), .N(16)) u816 (.clk, .rst_n, .load, .adv(1'b1), .corr('0), .lane(l816), .state(s816));
  psrg #(.L(DSS_L), .C(DSS_C), .SEED(64'h5A5A_1234), .M(1), .N(8))
       ud (.clk, .rst_n, .load, .adv(1'b1), .corr('0), .lane(ld), .state(sd));

  // Serial reference: register d[0..L-1], output d[L-1], feedback into d[0].
  localparam int NS = 40000;
  bit sdh_s [NS];
  bit dss_s [NS];
  task automatic gen(input int l, input logic [63:0] c, input logic [63:0] seed, output bit s [NS]);
    logic [63:0] d = seed;
    for (int n = 0; n < NS; n++) begin
      bit fb;
      s[n] = d[l-1];
      fb = d[l-1];
      for (int i = 1; i < l; i++) if (c[i]) fb ^= d[i-1];
      d = {d[62:0], fb};
      d[l] = 0;
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Figure values: Fig. 8a registers from the output end, Fig. 9a left to right.
  localparam string FIG8A = "11111110111001000001110010001101111111001100100000111000";
  localparam string FIG9A = "1000101";
  logic [6:0] s18;
  psrg #(.M(1), .N(8)) u18 (.clk, .rst_n, .load(1'b0), .adv(1'b0), .corr('0), .lane(), .state(s18));

  int k, kbase;
  initial begin
    gen(7, 64'hC1, 64'h7F, sdh_s);
    gen(31, 64'h9000_0001, 64'h5A5A_1234, dss_s);
    load = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 56; i++) chk(s84[i] == (FIG8A[i] == "1"), "Fig.8a initial state");
    for (int i = 0; i < 7; i++)  chk(s18[i] == (FIG9A[i] == "1"), "Fig.9a initial state");
    // run 2000 base clocks, reload, run again
    for (int pass = 0; pass < 2; pass++) begin
      for (k = 0; k < 2000; k++) begin
        for (int i = 0; i < 4; i++)
          chk(l84[i] == sdh_s[(k/8)*32 + i*8 + k%8], "(8,4) lane");
        for (int i = 0; i < 16; i++)
          chk(l816[i] == sdh_s[(k/8)*128 + i*8 + k%8], "(8,16) lane");
        if (pass == 0)
          for (int i = 0; i < 8; i++)
            chk(ld[i] == dss_s[k*8 + i], "(1,8) DSS lane");
        @(negedge clk);
      end
      load = 1;
      @(negedge clk);
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
