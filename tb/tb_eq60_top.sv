// tb_eq60_top: end-to-end test of the test chip at its full size, driven
// only through its pins.
//
// A five-path channel is set up: main tap h_2, post-cursors h_3 and h_4
// inside the S-DFE span, and two later paths (h_13, h_29) reached by M-DFE
// taps that are placed with non-zero tap offsets. All LUT words are
// computed here and written over the init bus: the emulator tables from
// the channel taps, and the equalizer tables from the channel estimate
// that run 1 reads back through the debug port. The configuration goes in through the scan chain, and
// the old contents are read back from scan_out on every reload.
//
// Runs, in order:
//   1. CE mode, noise off: ce_done must rise, and every word of the CE
//      memory, read through the debug port, must equal 256 * h_k (r units).
//   2. Data mode, noise off: every decision must equal the transmitted
//      symbol at the expected delay, and the BERT must report zero errors
//      over ber_nbits symbols and raise bert_done.
//   3. Data mode with AWGN: the BERT must count some errors but a BER below
//      5 %.
//   4. CE mode again (mode switch back), noise off: the estimate must again
//      be exact.
// The test counts each mechanism it relies on and fails if any never
// happened: CE run, data run, mode switches, non-zero tap offsets, noise,
// S-DFE speculation deciding a lane (both candidates differ), M-DFE
// subtraction, equalizer stall (clock enable low in CE mode), scan
// readback, init-bus writes and debug reads.
module tb_eq60_top;
  import eq_pkg::*;

  localparam int NBITS = 16000;
  localparam int LAG   = 3;      // decision u_k is symbol x_{k-LAG}
  // BERT delay: the channel/LE lag plus TX_LAT + EQ_LAT blocks, less the
  // one block between start and the BERT's first compared block.
  localparam int BER_DELAY = LAG + P * (TX_LAT + EQ_LAT - 1);

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel and equalizer settings ----------------
  int h [0:EMU_TAPS];      // emulator taps, quarter-r units
  int dpos [B_TAPS];
  logic [B_TAPS*2-1:0] offs;
  cfg_t cfg, cfg_prev;

  // ---------------- mechanism counters ----------------
  int n_ce_runs, n_data_runs, n_switch, n_noise, n_spec, n_mdfe, n_stall;
  int n_scan, n_init, n_dbg, n_offs;

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  // Scan in a new configuration, LSB first, and compare what comes out
  // with the previous one.
  task automatic load_cfg(cfg_t c);
    logic [CFG_W-1:0] bits, prevb, got;
    bits = c;
    prevb = cfg_prev;
    for (int i = 0; i < CFG_W; i++) begin
      @(negedge clk);
      scan_en = 1;
      scan_in = bits[i];
      got[i] = scan_out;
    end
    @(negedge clk);
    scan_en = 0;
    scan_update = 1;
    @(negedge clk);
    scan_update = 0;
    check(got == prevb, "scan readback differs from the previous configuration");
    n_scan++;
    if (c.mode != cfg_prev.mode) n_switch++;
    cfg_prev = c;
  endtask

  task automatic init_write(init_sel_e s, int a, int d);
    @(negedge clk);
    init_we = 1;
    init_sel = s;
    init_addr = INIT_AW'(a);
    init_data = INIT_DW'(d);
    n_init++;
  endtask

  // Estimated taps in quarter-r units, from the CE memory (256 h_k in
  // r units, so 64 per quarter-r LSB).
  int he [0:EMU_TAPS];

  function automatic int hev(int m);
    return (m <= EMU_TAPS) ? he[m] : 0;
  endfunction

  task automatic load_emu();
    // channel emulator: 12 groups of 6 taps
    for (int j = 0; j < EMU_TAPS / DA_K; j++)
      for (int K = 0; K < 64; K++) begin
        int v;
        v = 0;
        for (int i = 1; i <= DA_K; i++) v += h[DA_K*j+i] * (1 - 2 * ((K >> (i - 1)) & 1));
        init_write(SEL_EMU, 64 * j + K, v);
      end
    @(negedge clk);
    init_we = 0;
  endtask

  // Equalizer tables from the channel estimate.
  task automatic load_eq();
    // M-DFE: tap n cancels emulator tap 11 + D_n
    for (int g = 0; g < B_TAPS / DA_K; g++)
      for (int K = 0; K < 64; K++) begin
        int v;
        v = 0;
        for (int i = 0; i < DA_K; i++) begin
          int m;
          m = 11 + dpos[DA_K*g+i];
          v += hev(m) * (1 - 2 * ((K >> i) & 1));
        end
        init_write(SEL_MDFE, 64 * g + K, v);
      end
    // LE: w_1 = 8, a one-symbol pass-through at unit gain in quarter-r units
    for (int K = 0; K < 64; K++) init_write(SEL_LE, K, 8 * (K & 1));
    // S-DFE: g_i = h_{2+i}
    for (int K = 0; K < 256; K++) begin
      int v;
      v = 0;
      for (int i = 1; i <= L_TAPS; i++) v += hev(2+i) * (1 - 2 * ((K >> (i - 1)) & 1));
      init_write(SEL_SDFE, K, v);
    end
    @(negedge clk);
    init_we = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic dbg_read(int a, output int d);
    @(negedge clk);
    dbg_addr = 8'(a);
    @(negedge clk);
    d = int'(dbg_data);
    n_dbg++;
  endtask

  task automatic ce_run();
    int t, d;
    pulse_start();
    t = 0;
    while (!ce_done && t < 2000) begin @(negedge clk); t++; end
    check(ce_done, "ce_done never rose");
    for (int k = 0; k < CE_N; k++) begin
      int e;
      dbg_read(k, d);
      d = int'($signed(d[CE_HW-1:0]));
      e = (k <= EMU_TAPS) ? 64 * h[k] : 0;
      check(d == e, $sformatf("CE word %0d = %0d, expected %0d", k, d, e));
      if (k <= EMU_TAPS) he[k] = (d >= 0) ? (d + 32) / 64 : -((-d + 32) / 64);
    end
    dbg_read(130, d);
    check(d[2] && !d[1], "status word does not show ce_done without busy");
    n_ce_runs++;
  endtask

  // ---------------- stream capture during data runs ----------------
  bit capture;
  int txs [$];
  int dec [$];

  always @(posedge clk) begin
    if (capture) begin
      for (int p = 0; p < P; p++) txs.push_back(int'(dut.tx_x[p]));
      if (x_valid) for (int p = 0; p < P; p++) dec.push_back(int'(x_hat[p]));
    end
    if (rst_n && x_valid) begin
      if (dut.u_eq.u_sdfe.cand[1] != dut.u_eq.u_sdfe.cand[2]) n_spec++;
      if (dut.u_eq.y[0] != 0) n_mdfe++;
      if (dut.cfg.noise_sigma != 0 && dut.u_tx.n[0] != 0) n_noise++;
    end
    if (rst_n && dut.cfg.mode == MODE_CE && !dut.u_eq.en) n_stall++;
  end

  task automatic data_run(bit noisy, output int bits, output int errs);
    int t, d;
    txs.delete();
    dec.delete();
    @(negedge clk);
    capture = 1;
    pulse_start();
    t = 0;
    while (!bert_done && t < 20 * NBITS) begin @(negedge clk); t++; end
    capture = 0;
    check(bert_done, "bert_done never rose");
    dbg_read(128, bits);
    dbg_read(129, errs);
    dbg_read(130, d);
    check(d[0], "status word does not show bert_done");
    check(bits == NBITS, $sformatf("BERT compared %0d symbols, expected %0d", bits, NBITS));
    if (!noisy) begin
      // Decisions are continuous across start, so align on the capture:
      // capture index i of dec is symbol i - dec_off of the tx capture.
      int mism, first_bad;
      mism = 0;
      first_bad = -1;
      for (int i = 200; i < dec.size(); i++) begin
        int j;
        j = i - LAG - 4 * EQ_LAT - 4 * TX_LAT + 4;
        if (j >= 0 && j < txs.size() && dec[i] != txs[j]) begin
          mism++;
          if (first_bad < 0) first_bad = i;
        end
      end
      check(mism == 0, $sformatf("%0d decisions differ from the sent symbols (first at %0d)", mism, first_bad));
      if (mism != 0)
        for (int l = 0; l < 40; l++) begin
          int mm;
          mm = 0;
          for (int i = 200; i < 1200; i++) if (dec[i] != txs[i - l]) mm++;
          if (mm == 0) $display("  decisions match the sent symbols at lag %0d", l);
        end
      check(errs == 0, $sformatf("BERT counted %0d errors without noise", errs));
    end
    n_data_runs++;
  endtask

  initial begin
    int bits, errs;
    n_ce_runs = 0; n_data_runs = 0; n_switch = 0; n_noise = 0; n_spec = 0;
    n_mdfe = 0; n_stall = 0; n_scan = 0; n_init = 0; n_dbg = 0; n_offs = 0;
    capture = 0;
    for (int m = 0; m <= EMU_TAPS; m++) h[m] = 0;
    h[2] = 12; h[3] = 4; h[4] = -4; h[13] = 4; h[29] = 4;
    // M-DFE tap positions: D_0 = 2, steps of 2 up to tap 8, then 1
    offs = '0;
    offs[1:0] = 2'd2;
    for (int n = 1; n <= 8; n++) offs[2*n +: 2] = 2'd1;
    begin
      int acc;
      acc = 0;
      for (int n = 0; n < B_TAPS; n++) begin
        acc += ((n == 0) ? 0 : 1) + int'(offs[2*n +: 2]);
        dpos[n] = acc;
        if (offs[2*n +: 2] != 0) n_offs++;
      end
    end
    cfg_prev = '0;

    repeat (4) @(negedge clk);
    rst_n = 1;
    load_emu();

    // 1. channel estimation
    cfg = '0;
    cfg.mode = MODE_CE;
    cfg.tap_offset = offs;
    cfg.ber_delay = 8'(BER_DELAY);
    cfg.ber_nbits = 24'(NBITS);
    load_cfg(cfg);
    ce_run();
    // the equalizer tables come from the estimate, as in the real flow
    load_eq();

    // 2. data mode, no noise
    cfg.mode = MODE_DATA;
    load_cfg(cfg);
    data_run(0, bits, errs);
    $display("data run, no noise: %0d symbols, %0d errors", bits, errs);

    // 3. data mode with noise
    cfg.noise_sigma = 8'd3;
    load_cfg(cfg);
    data_run(1, bits, errs);
    $display("data run, sigma 3: %0d symbols, %0d errors", bits, errs);
    check(errs > 0, "noise produced no errors");
    check(errs * 20 < bits, "BER above 5 %");

    // 4. back to channel estimation
    cfg.noise_sigma = 8'd0;
    cfg.mode = MODE_CE;
    load_cfg(cfg);
    ce_run();

    $display("mechanisms: ce=%0d data=%0d switch=%0d offsets=%0d noise=%0d spec=%0d mdfe=%0d stall=%0d scan=%0d init=%0d dbg=%0d",
             n_ce_runs, n_data_runs, n_switch, n_offs, n_noise, n_spec, n_mdfe, n_stall,
             n_scan, n_init, n_dbg);
    check(n_ce_runs >= 2, "CE mode not run twice");
    check(n_data_runs >= 2, "data mode not run twice");
    check(n_switch >= 3, "fewer than three mode switches");
    check(n_offs > 0, "no non-zero tap offsets");
    check(n_noise > 0, "noise never applied");
    check(n_spec > 0, "S-DFE speculation never decided a lane");
    check(n_mdfe > 0, "M-DFE never subtracted anything");
    check(n_stall > 0, "equalizer never stalled");
    check(n_scan > 0 && n_init > 0 && n_dbg > 0, "a control port was never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
