// tb_ber_workloads: BER workloads on the full chip, driven through its pins.
//
// 1. Single-path AWGN. The emulator has one tap (h_2 = 16 quarter-r LSBs,
//    r = +-4), the DFEs are zero, and the LE is a pass-through, so a
//    decision is wrong exactly when the noise pushes r across zero:
//    n < -A - 2 for a +1 symbol and n >= A - 2 for a -1 symbol, with the
//    rounding offset of the r quantizer. The noise sample is
//    ((sum of four uniform bytes - 510) * sigma) >>> 7. The testbench
//    computes that distribution exactly, by convolution, and hence the
//    expected error count at four noise levels. The BERT count must lie
//    within 5 binomial standard deviations (+3) of it. Eb/N0 is printed
//    for each point, taking Eb = A^2 and N0/2 = the noise variance.
// 2. Four-path channel reaching the full 72-symbol span: main tap h_2, a
//    post-cursor h_4 (S-DFE), and echoes at h_26 and h_72 (M-DFE taps 5
//    and 23, placed with tap offsets so that D_23 = 61). Without noise the
//    BERT must count zero errors. With noise at sigma 5 (Eb/N0 of about
//    3.3 dB on the main tap, close to the 4 dB operating point of the
//    reference measurements) the BER is printed and must be below 5 %.
// 3. A strong precursor (h_1 = 10, h_2 = 16, h_3 = 2). The LE is first a
//    pass-through and then a three-tap precursor canceller
//    w = (3, -5, 8), which moves the decision delay from 3 to 5 symbols.
//    The S-DFE table then holds the combined channel-and-LE response,
//    f_j = sum_m w_m h_{j-m} / 8. Both settings must be error-free without
//    noise. With noise, the LE setting must cut the error count by at
//    least a quarter.
module tb_ber_workloads;
  import eq_pkg::*;

  localparam int NBITS = 20000;

  logic clk = 0, rst_n = 0, start = 0;
  logic scan_en = 0, scan_in = 0, scan_update = 0, scan_out;
  logic init_we = 0;
  init_sel_e init_sel = SEL_EMU;
  logic [INIT_AW-1:0] init_addr = '0;
  logic [INIT_DW-1:0] init_data = '0;
  logic [7:0] dbg_addr = '0;
  logic [31:0] dbg_data;
  logic bert_done, ce_done;
  logic [P-1:0] x_hat;
  logic x_valid;

  int checks = 0, failures = 0;

  eq60_top dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [0:EMU_TAPS];
  int dpos [B_TAPS];
  logic [B_TAPS*2-1:0] offs;
  cfg_t cfg;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic load_cfg(cfg_t c);
    logic [CFG_W-1:0] bits;
    bits = c;
    for (int i = 0; i < CFG_W; i++) begin
      @(negedge clk);
      scan_en = 1;
      scan_in = bits[i];
    end
    @(negedge clk);
    scan_en = 0;
    scan_update = 1;
    @(negedge clk);
    scan_update = 0;
  endtask

  task automatic init_write(init_sel_e s, int a, int d);
    @(negedge clk);
    init_we = 1;
    init_sel = s;
    init_addr = INIT_AW'(a);
    init_data = INIT_DW'(d);
  endtask

  function automatic int hv(int m);
    return (m >= 1 && m <= EMU_TAPS) ? h[m] : 0;
  endfunction

  // LE taps and the decision delay dd (u_k decides x_{k-dd}). Unless set
  // otherwise the LE is a pass-through (w_1 = 8) and dd = 3 for a main tap
  // at h_2.
  int w [1:A_TAPS];
  int dd;

  // Combined response of channel and LE seen by the S-DFE, in quarter-r
  // units: f_j = sum_m w_m h_{j-m} / 8, rounded.
  function automatic int fcomb(int j);
    int acc;
    acc = 0;
    for (int m = 1; m <= A_TAPS; m++) acc += w[m] * hv(j - m);
    return (acc >= 0) ? (acc + 4) / 8 : -((-acc + 4) / 8);
  endfunction

  // LUT words: S-DFE g_i = f_{dd+i}, M-DFE tap n cancels channel tap
  // h_{dd+8+D_n} at the LE input, LE words from w.
  task automatic load_luts();
    int acc;
    acc = 0;
    for (int n = 0; n < B_TAPS; n++) begin
      acc += ((n == 0) ? 0 : 1) + int'(offs[2*n +: 2]);
      dpos[n] = (acc > 63) ? 63 : acc;
    end
    for (int j = 0; j < EMU_TAPS / DA_K; j++)
      for (int K = 0; K < 64; K++) begin
        int v;
        v = 0;
        for (int i = 1; i <= DA_K; i++) v += h[DA_K*j+i] * (1 - 2 * ((K >> (i - 1)) & 1));
        init_write(SEL_EMU, 64 * j + K, v);
      end
    for (int g = 0; g < B_TAPS / DA_K; g++)
      for (int K = 0; K < 64; K++) begin
        int v;
        v = 0;
        for (int i = 0; i < DA_K; i++) v += hv(dd + 8 + dpos[DA_K*g+i]) * (1 - 2 * ((K >> i) & 1));
        init_write(SEL_MDFE, 64 * g + K, v);
      end
    for (int K = 0; K < 64; K++) begin
      int v;
      v = 0;
      for (int m = 1; m <= A_TAPS; m++) v += w[m] * ((K >> (m - 1)) & 1);
      init_write(SEL_LE, K, v);
    end
    for (int K = 0; K < 256; K++) begin
      int v;
      v = 0;
      for (int i = 1; i <= L_TAPS; i++) v += fcomb(dd + i) * (1 - 2 * ((K >> (i - 1)) & 1));
      init_write(SEL_SDFE, K, v);
    end
    @(negedge clk);
    init_we = 0;
  endtask

  task automatic dbg_read(int a, output int d);
    @(negedge clk);
    dbg_addr = 8'(a);
    @(negedge clk);
    d = int'(dbg_data);
  endtask

  task automatic ber_run(int sigma, output int bits, output int errs);
    int t;
    cfg.noise_sigma = 8'(sigma);
    cfg.ber_delay = 8'(dd + P * (TX_LAT + EQ_LAT - 1));
    load_cfg(cfg);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!bert_done && t < 20 * NBITS) begin @(negedge clk); t++; end
    check(bert_done, "bert_done never rose");
    dbg_read(128, bits);
    dbg_read(129, errs);
    check(bits == NBITS, $sformatf("BERT compared %0d symbols", bits));
  endtask

  // Exact error probability of the single-path case.
  longint ihd [0:1020];

  function automatic real pe_awgn(int a, int sigma);
    longint bad_p, bad_m, tot;
    bad_p = 0;
    bad_m = 0;
    tot = 0;
    for (int s = 0; s <= 1020; s++) begin
      longint n;
      n = (longint'(s - 510) * sigma) >>> 7;
      tot += ihd[s];
      if (n < -a - 2) bad_p += ihd[s];
      if (n >= a - 2) bad_m += ihd[s];
    end
    return 0.5 * (real'(bad_p) + real'(bad_m)) / real'(tot);
  endfunction

  function automatic real ebn0_db(int a, int sigma);
    real var_n;
    var_n = 4.0 * (256.0 * 256.0 - 1.0) / 12.0 * (real'(sigma) / 128.0) ** 2;
    return 10.0 * $log10(real'(a * a) / (2.0 * var_n));
  endfunction

  initial begin
    int bits, errs, errs_off;
    int sig [4];
    sig = '{12, 9, 7, 5};
    // distribution of the sum of four uniform bytes
    begin
      longint d1 [0:1020];
      for (int s = 0; s <= 1020; s++) ihd[s] = (s <= 255) ? 1 : 0;
      for (int k = 1; k < 4; k++) begin
        for (int s = 0; s <= 1020; s++) begin
          longint acc;
          acc = 0;
          for (int b = 0; b <= 255; b++) if (s - b >= 0) acc += ihd[s-b];
          d1[s] = acc;
        end
        ihd = d1;
      end
    end
    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---------------- 1. single-path AWGN ----------------
    for (int m = 0; m <= EMU_TAPS; m++) h[m] = 0;
    h[2] = 16;
    offs = '0;
    for (int m = 1; m <= A_TAPS; m++) w[m] = 0;
    w[1] = 8;
    dd = 3;
    load_luts();
    cfg = '0;
    cfg.mode = MODE_DATA;
    cfg.tap_offset = offs;
    cfg.ber_nbits = 24'(NBITS);
    for (int i = 0; i < 4; i++) begin
      real pe, expn, tol;
      ber_run(sig[i], bits, errs);
      pe = pe_awgn(16, sig[i]);
      expn = pe * real'(bits);
      tol = 5.0 * $sqrt(expn * (1.0 - pe)) + 3.0;
      $display("AWGN  sigma %0d  Eb/N0 %5.2f dB  BER %e  expected %e",
               sig[i], ebn0_db(16, sig[i]), real'(errs) / real'(bits), pe);
      check(real'(errs) >= expn - tol && real'(errs) <= expn + tol,
            $sformatf("AWGN sigma %0d: %0d errors, expected %0.1f +- %0.1f", sig[i], errs, expn, tol));
    end

    // ---------------- 2. four-path channel, 72-symbol reach ----------------
    for (int m = 0; m <= EMU_TAPS; m++) h[m] = 0;
    h[2] = 12; h[4] = -6; h[26] = 5; h[72] = 4;
    offs = '0;
    for (int n = 1; n <= 19; n++) offs[2*n +: 2] = 2'd2;   // D_n = 3n up to n = 19
    load_luts();
    check(dpos[5] == 15 && dpos[B_TAPS-1] == 61, "unexpected M-DFE tap positions");
    cfg.tap_offset = offs;
    ber_run(0, bits, errs);
    $display("4-path, no noise: %0d symbols, %0d errors", bits, errs);
    check(errs == 0, "errors on the 4-path channel without noise");
    ber_run(5, bits, errs);
    $display("4-path  sigma 5  Eb/N0 %5.2f dB (main tap)  BER %e", ebn0_db(12, 5), real'(errs) / real'(bits));
    check(errs * 20 < bits, "4-path BER above 5 %");

    // ---------------- 3. strong precursor, LE on and off ----------------
    for (int m = 0; m <= EMU_TAPS; m++) h[m] = 0;
    h[1] = 10; h[2] = 16; h[3] = 2;
    offs = '0;
    cfg.tap_offset = offs;
    // pass-through LE: the precursor stays in the decision variable
    for (int m = 1; m <= A_TAPS; m++) w[m] = 0;
    w[1] = 8;
    dd = 3;
    load_luts();
    ber_run(0, bits, errs);
    check(errs == 0, "precursor channel, pass-through LE: errors without noise");
    ber_run(4, bits, errs);
    errs_off = errs;
    // three-tap LE inverting 1 + (10/16) D^-1: w = 8 * (a^2, -a, 1), a = 10/16
    w[1] = 3; w[2] = -5; w[3] = 8;
    dd = 5;
    load_luts();
    ber_run(0, bits, errs);
    check(errs == 0, "precursor channel, LE on: errors without noise");
    ber_run(4, bits, errs);
    $display("precursor channel, sigma 4: BER %e with pass-through LE, %e with precursor LE",
             real'(errs_off) / real'(bits), real'(errs) / real'(bits));
    check(errs * 4 < errs_off * 3, "the LE did not cut the error count by a quarter");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
