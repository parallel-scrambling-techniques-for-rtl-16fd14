// tb_dss_par_descrambler: self-checking testbench of the parallel DSS
// descrambler with double sampling and double correction.
//
// A dss_par_scrambler feeds three descramblers that start from states unlike
// the scrambler's and use correction delays BETA = 1, 26 and 53 (the whole
// allowed range 1..alpha). Each must reproduce the original cells exactly
// (payload and header; the HEC byte as CRC-8 of the header XOR 0x55, computed
// here) from the 17th cell on, i.e. after J = 16 sample pairs, with one clock
// of latency. Then one HEC bit 8 on the line is flipped, which makes the
// descramblers apply a wrong correction; they must lose and regain
// synchronisation, again within 16 cells. Corrections and lock events are
// counted and must have happened.
module tb_dss_par_descrambler;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CELLS = 80;
  localparam int NB = CELLS * 53;
  localparam int ERR_CELL = 40;

  logic [7:0] in_byte, line, line_err;
  logic cell_start, line_cs;
  logic [1:0] sample;
  logic flip;

  dss_par_scrambler #(.SEED(64'h0BAD_F00D)) u_scr (
    .clk, .rst_n, .in_byte, .cell_start, .out_byte(line), .out_cell_start(line_cs), .sample);

  assign line_err = line ^ {flip, 7'b0};

  localparam int NB_D = 3;
  logic [7:0] dout [NB_D];
  logic dcs [NB_D], locked [NB_D], cev [NB_D];

  dss_par_descrambler #(.SEED(64'h1),          .BETA(1))  u_d0 (
    .clk, .rst_n, .in_byte(line_err), .cell_start(line_cs), .out_byte(dout[0]),
    .out_cell_start(dcs[0]), .locked(locked[0]), .corr_event(cev[0]));
  dss_par_descrambler #(.SEED(64'h7FFF_FFFF), .BETA(26)) u_d1 (
    .clk, .rst_n, .in_byte(line_err), .cell_start(line_cs), .out_byte(dout[1]),
    .out_cell_start(dcs[1]), .locked(locked[1]), .corr_event(cev[1]));
  dss_par_descrambler #(.SEED(64'h0),          .BETA(53), .U_SEL(1'b1)) u_d2 (
    .clk, .rst_n, .in_byte(line_err), .cell_start(line_cs), .out_byte(dout[2]),
    .out_cell_start(dcs[2]), .locked(locked[2]), .corr_event(cev[2]));

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
  int corrections [NB_D];
  int lock_rises [NB_D];
  bit was_locked [NB_D];
  int bad_after_err [NB_D];

  initial begin
    for (int k = 0; k < NB; k++) din[k] = 8'($urandom);
    for (int c = 0; c < CELLS; c++) begin
      logic [7:0] h [4];
      for (int i = 0; i < 4; i++) h[i] = din[c*53 + i];
      din[c*53 + 4] = crc8(h) ^ 8'h55;
    end
    for (int d = 0; d < NB_D; d++) begin
      corrections[d] = 0; lock_rises[d] = 0; was_locked[d] = 0; bad_after_err[d] = 0;
    end
    in_byte = 0; cell_start = 0; flip = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // byte k enters the scrambler at clock k, is on the line at clock k+1
    // and leaves the descrambler at clock k+2
    for (int k = 0; k < NB + 2; k++) begin
      if (k < NB) begin in_byte = din[k]; cell_start = (k % 53 == 0); end
      flip = (k - 1 == ERR_CELL * 53 + 4);
      @(negedge clk);
      for (int d = 0; d < NB_D; d++) begin
        corrections[d] += cev[d];
        if (locked[d] && !was_locked[d]) lock_rises[d]++;
        was_locked[d] = locked[d];
      end
      if (k >= 1 && k - 1 < NB) begin
        int b, c;
        b = k - 1;  // byte index now at the descrambler outputs
        c = b / 53;
        for (int d = 0; d < NB_D; d++) begin
          chk(dcs[d] == (b % 53 == 0), "out_cell_start");
          // synchronised from cell 16 on (16 sample pairs at cells 0..15,
          // the last correction lands at most 53 bytes after cell 15's HEC)
          if ((c >= 17 && c < ERR_CELL) || c >= ERR_CELL + 18)
            chk(dout[d] == din[b], "descrambled byte");
          if (c > ERR_CELL && c < ERR_CELL + 18 && dout[d] != din[b]) bad_after_err[d]++;
        end
      end
    end
    for (int d = 0; d < NB_D; d++) begin
      chk(corrections[d] > 0, "corrections happened");
      chk(lock_rises[d] >= 2, "locked again after the line error");
      chk(bad_after_err[d] > 0, "line error disturbed the descrambler");
      chk(locked[d], "locked at the end");
      $display("descrambler %0d: corrections=%0d lock_rises=%0d bad_bytes_after_error=%0d",
               d, corrections[d], lock_rises[d], bad_after_err[d]);
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
