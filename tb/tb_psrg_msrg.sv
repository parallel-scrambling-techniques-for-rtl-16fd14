// tb_psrg_msrg: self-checking testbench of the modular (MSRG) form of the
// parallel shift register generator.
//
// Five generators are checked against a serial reference SSRG written here
// (a plain L-bit shift register with characteristic polynomial C(x)): lane i
// at clock k must equal serial bit s[(k/M)*MN + i*M + k%M].
//   (8,4), (8,16) and (1,8) for x^7+x^6+1 reset to 1111111
//   (1,1), the serial modular scrambler itself
//   (1,8) for x^31+x^28+1 (the DSS polynomial)
// The initial register contents of the (1,1), (8,4) and (1,8) generators are
// compared with the published modular generators (1111110; the 56-bit
// (8,4) state; 1000100). A reload in the middle of the run is exercised.
module tb_psrg_msrg;
  import scr_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic load;
  logic [3:0]  l84;  logic [55:0] s84;
  logic [15:0] l816;
  logic [7:0]  l18;  logic [6:0] s18;
  logic [0:0]  l11;  logic [6:0] s11;
  logic [7:0]  ld;

  psrg_msrg #(.M(8), .N(4))  u84  (.clk, .rst_n, .load, .adv(1'b1), .lane(l84),  .state(s84));
  psrg_msrg #(.M(8), .N(16)) u816 (.clk, .rst_n, .load, .adv(1'b1), .lane(l816), .state());
  psrg_msrg #(.M(1), .N(8))  u18  (.clk, .rst_n, .load, .adv(1'b1), .lane(l18),  .state(s18));
  psrg_msrg #(.M(1), .N(1))  u11  (.clk, .rst_n, .load, .adv(1'b1), .lane(l11),  .state(s11));
  psrg_msrg #(.L(DSS_L), .C(DSS_C), .SEED(64'h0BAD_F00D), .M(1), .N(8))
            ud (.clk, .rst_n, .load, .adv(1'b1), .lane(ld), .state());

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

  // Published modular register contents, output end first.
  localparam string FIG_84 = "11111110111001000001110010001101111111001100100011000110";
  localparam string FIG_18 = "1000100";
  localparam string FIG_11 = "1111110";

  int k;
  initial begin
    gen(7, 64'hC1, 64'h7F, sdh_s);
    gen(31, 64'h9000_0001, 64'h0BAD_F00D, dss_s);
    load = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 56; i++) chk(s84[55-i] == (FIG_84[i] == "1"), "(8,4) initial state");
    for (int i = 0; i < 7; i++)  chk(s18[6-i]  == (FIG_18[i] == "1"), "(1,8) initial state");
    for (int i = 0; i < 7; i++)  chk(s11[6-i]  == (FIG_11[i] == "1"), "(1,1) initial state");
    for (int pass = 0; pass < 2; pass++) begin
      for (k = 0; k < 2000; k++) begin
        for (int i = 0; i < 4; i++)
          chk(l84[i] == sdh_s[(k/8)*32 + i*8 + k%8], "(8,4) lane");
        for (int i = 0; i < 16; i++)
          chk(l816[i] == sdh_s[(k/8)*128 + i*8 + k%8], "(8,16) lane");
        for (int i = 0; i < 8; i++)
          chk(l18[i] == sdh_s[k*8 + i], "(1,8) lane");
        chk(l11[0] == sdh_s[k], "(1,1) output");
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
