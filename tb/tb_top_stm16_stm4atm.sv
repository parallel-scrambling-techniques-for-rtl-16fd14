// tb_top_stm16_stm4atm: end-to-end testbench of parallel_scrambling_top at
// the larger sizes the method is applied to: an STM-16 SDH link with the
// (8,16) parallel generator (16 byte-interleaved lanes at the STM-1 rate) and
// SDH-based ATM on STM-4 frames (9720 bytes, 36 unscrambled, one byte per
// clock, 77.76 MHz at the real line rate). The cell-based ATM part runs as at the defaults.
//
// Same structure and reference models as the default-size end-to-end
// testbench: every transmitter looped back to its receiver, line bytes
// compared with a serial x^7+x^6+1 scrambler at the line rate, recovered
// AUG/SOH bits and bytes compared with what was sent, the DSS pair locking,
// losing sync after a HEC sample error and locking again. The same mechanism
// counters must all be nonzero.
module tb_top_stm16_stm4atm;
  localparam int N = 16;
  localparam int AF = 9720;   // STM-4 frame bytes (SDH-based ATM)
  localparam int AU = 36;     // unscrambled bytes per STM-4 frame
  localparam int SDH_FRAMES = 3;
  localparam int CLKS = SDH_FRAMES * 19440 + 64;
  localparam int CELLS = CLKS / 53 - 2;
  localparam int ERR_CELL = 300;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic [N-1:0] aug_in, soh_in, aug_out, soh_out;
  logic aug_rd, soh_rd, tx_valid, tx_fs, aug_valid, aug_fs, soh_valid;
  logic [N-1:0][7:0] tx_word;
  logic [7:0] a_in, a_line, a_out;
  logic a_in_fs, a_line_v, a_line_fs, a_out_v, a_out_fs;
  logic [7:0] d_in, d_line, d_line_err, d_out;
  logic d_cs, d_line_cs, d_out_cs, d_locked, d_corr, flip;
  logic [1:0] d_sample;

  parallel_scrambling_top #(.SDH_N(16), .ATM_STM_N(4)) dut (
    .clk, .rst_n,
    .sdh_tx_aug_bit(aug_in), .sdh_tx_soh_bit(soh_in),
    .sdh_tx_aug_rd(aug_rd), .sdh_tx_soh_rd(soh_rd),
    .sdh_tx_word(tx_word), .sdh_tx_valid(tx_valid), .sdh_tx_fs(tx_fs),
    .sdh_rx_word(tx_word), .sdh_rx_valid(tx_valid), .sdh_rx_fs(tx_fs),
    .sdh_rx_aug_bit(aug_out), .sdh_rx_aug_valid(aug_valid), .sdh_rx_aug_fs(aug_fs),
    .sdh_rx_soh_bit(soh_out), .sdh_rx_soh_valid(soh_valid),
    .atm_fss_tx_in(a_in), .atm_fss_tx_in_valid(1'b1), .atm_fss_tx_in_fs(a_in_fs),
    .atm_fss_tx_out(a_line), .atm_fss_tx_out_valid(a_line_v), .atm_fss_tx_out_fs(a_line_fs),
    .atm_fss_rx_in(a_line), .atm_fss_rx_in_valid(a_line_v), .atm_fss_rx_in_fs(a_line_fs),
    .atm_fss_rx_out(a_out), .atm_fss_rx_out_valid(a_out_v), .atm_fss_rx_out_fs(a_out_fs),
    .dss_tx_in(d_in), .dss_tx_cell_start(d_cs),
    .dss_tx_out(d_line), .dss_tx_out_cell_start(d_line_cs), .dss_tx_sample(d_sample),
    .dss_rx_in(d_line_err), .dss_rx_cell_start(d_line_cs),
    .dss_rx_out(d_out), .dss_rx_out_cell_start(d_out_cs),
    .dss_rx_locked(d_locked), .dss_rx_corr_event(d_corr)
  );
  assign d_line_err = d_line ^ {flip, 7'b0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference models ----------------
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

  function automatic bit src(int f, int r, int c, int lane, int b, bit soh);
    int unsigned h = (f * 7919 + r * 271 + c * 31 + lane * 17 + b * 3 + (soh ? 101 : 0)) * 32'd2654435761;
    return h[17];
  endfunction

  function automatic logic [7:0] sdh_line_byte(int f, int q);
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

  function automatic logic [7:0] atm_line_byte(logic [7:0] v, int b);
    logic [7:0] r = v;
    if (b >= AU)
      for (int j = 0; j < 8; j++) r[7-j] ^= sser[((b - AU) * 8 + j) % 127];
    return r;
  endfunction

  function automatic logic [7:0] crc8(logic [7:0] b [4]);
    logic [7:0] r = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 7; j >= 0; j--) begin
        bit f = r[7] ^ b[i][j];
        r = {r[6:0], 1'b0} ^ (f ? 8'h07 : 8'h00);
      end
    return r;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_sdh_reload = 0, n_sdh_frames_rx = 0, n_soh_bits = 0, n_atm_reload = 0;
  int n_dss_corr = 0, n_dss_lock = 0, n_dss_unlock = 0, n_dss_bad = 0;
  bit was_locked = 0;

  // ---------------- SDH stimulus and checks ----------------
  int k = 0;           // transmitter lane bit position
  always @(posedge clk) if (rst_n) k <= k + 1;
  always_comb begin
    int lb;
    lb = (k / 8) % 2430;
    for (int i = 0; i < N; i++) begin
      aug_in[i] = src(k / 19440, lb / 270, lb % 270, i, k % 8, 0);
      soh_in[i] = src(k / 19440, lb / 270, lb % 270, i, k % 8, 1);
    end
  end

  int words = 0, p = -1;
  always @(negedge clk) if (rst_n) begin
    int f, wb, lb, r, c, b;
    bit soh;
    n_sdh_reload += (dut.u_sdh_tx.u_psrg.load && k % 8 == 0 && (k / 8) % 2430 == 8);
    if (tx_valid) begin
      f = words / 2430; wb = words % 2430;
      for (int i = 0; i < N; i++) chk(tx_word[i] == sdh_line_byte(f, wb * N + i), "SDH line byte");
      chk(tx_fs == (wb == 0), "SDH line_fs");
      words++;
    end
    if (aug_valid || soh_valid) begin
      if (p < 0 && aug_fs) p = 72;
      if (p >= 0) begin
        lb = (p / 8) % 2430; f = p / 19440; r = lb / 270; c = lb % 270; b = p % 8;
        soh = (c < 9) && (r != 3);
        chk(soh_valid == soh && aug_valid == !soh, "SDH rx split");
        for (int i = 0; i < N; i++)
          chk((soh ? soh_out[i] : aug_out[i]) == src(f, r, c, i, b, soh), "SDH rx bit");
        n_soh_bits += soh;
        if (aug_fs) n_sdh_frames_rx++;
        p++;
      end
    end
  end

  // ---------------- ATM streams ----------------
  logic [7:0] a_hist [4];
  logic [7:0] cells [CELLS * 53];
  initial begin
    gen_serial();
    for (int q = 0; q < CELLS * 53; q++) cells[q] = 8'($urandom);
    for (int c = 0; c < CELLS; c++) begin
      logic [7:0] h [4];
      for (int i = 0; i < 4; i++) h[i] = cells[c*53 + i];
      cells[c*53 + 4] = crc8(h) ^ 8'h55;
    end
    a_in = 0; a_in_fs = 0; d_in = 0; d_cs = 0; flip = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CLKS; t++) begin
      a_in = 8'($urandom);
      a_in_fs = (t % AF == 0);
      a_hist[t % 4] = a_in;
      if (t < CELLS * 53) begin d_in = cells[t]; d_cs = (t % 53 == 0); end
      flip = (t - 1 == ERR_CELL * 53 + 4);
      @(negedge clk);
      // SDH-based ATM: byte t on the line now, byte t-1 out of the descrambler
      chk(a_line == atm_line_byte(a_in, t % AF), "ATM FSS line byte");
      if (t >= 1) chk(a_out_v && a_out == a_hist[(t - 1) % 4], "ATM FSS descrambled byte");
      n_atm_reload += (t % AF == AU - 1);
      // DSS: byte t-1 out of the descrambler
      n_dss_corr += d_corr;
      if (d_locked && !was_locked) n_dss_lock++;
      if (!d_locked && was_locked) n_dss_unlock++;
      was_locked = d_locked;
      if (t >= 1 && t - 1 < CELLS * 53) begin
        int cb, cc;
        cb = t - 1; cc = cb / 53;
        chk(d_out_cs == (cb % 53 == 0), "DSS cell start");
        if ((cc >= 17 && cc < ERR_CELL) || cc >= ERR_CELL + 18)
          chk(d_out == cells[cb], "DSS descrambled byte");
        if (cc > ERR_CELL && cc < ERR_CELL + 18 && d_out != cells[cb]) n_dss_bad++;
      end
    end
    chk(words >= SDH_FRAMES * 2430 - 1, "SDH words sent");
    chk(n_sdh_reload >= SDH_FRAMES, "SDH PSRG reloads");
    chk(n_sdh_frames_rx >= SDH_FRAMES - 1, "SDH frames received");
    chk(n_soh_bits > 0, "SOH bits inserted and removed");
    chk(n_atm_reload >= 5, "ATM FSS frame restarts");
    chk(n_dss_corr > 0, "DSS corrections");
    chk(n_dss_lock >= 2, "DSS lock, loss and re-lock");
    chk(n_dss_unlock >= 1, "DSS loss of sync after line error");
    chk(n_dss_bad > 0, "line error disturbed the DSS descrambler");
    $display("mechanisms: sdh_reload=%0d sdh_frames_rx=%0d soh_bits=%0d atm_reload=%0d dss_corr=%0d dss_lock=%0d dss_unlock=%0d dss_bad_bytes=%0d",
             n_sdh_reload, n_sdh_frames_rx, n_soh_bits, n_atm_reload, n_dss_corr, n_dss_lock, n_dss_unlock, n_dss_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CLKS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
