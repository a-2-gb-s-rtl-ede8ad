// tb_ce_workload: channel estimation of a dense multipath profile on the
// full chip, the way the emulator and the estimator are compared on the
// test chip.
//
// The emulator gets an NLOS-like profile of 19 taps spread over 60
// symbols: a main tap with two close echoes and two later clusters of
// small taps. After a CE-mode run, all 128 estimate words are read through
// the debug port. The only error source is the rounding of r to 4 bits,
// because the profile never clips r. That error averages out over the 256
// correlated samples: its standard deviation is sqrt(256/12), about 4.6
// estimate LSBs. Every word must be within 40 of 64 * h_k (h in
// quarter-r units, so a tap of 1 is 64). The zero taps, and the span from
// 61 to 127 where nothing is sent, must stay within the same bound. The
// measured RMS error is printed.
module tb_ce_workload;
  import eq_pkg::*;

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
    repeat (100000) @(posedge clk);
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

  // LUT words for a channel whose main tap is h_2: LE w_1 = 8,
  // S-DFE g_i = h_{2+i}, M-DFE tap n = h_{11+D_n}.
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
        for (int i = 0; i < DA_K; i++) v += hv(11 + dpos[DA_K*g+i]) * (1 - 2 * ((K >> i) & 1));
        init_write(SEL_MDFE, 64 * g + K, v);
      end
    for (int K = 0; K < 64; K++) init_write(SEL_LE, K, 8 * (K & 1));
    for (int K = 0; K < 256; K++) begin
      int v;
      v = 0;
      for (int i = 1; i <= L_TAPS; i++) v += h[2+i] * (1 - 2 * ((K >> (i - 1)) & 1));
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


  initial begin
    int d;
    real se;
    int worst;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m <= EMU_TAPS; m++) h[m] = 0;
    h[2] = 8; h[3] = -3; h[5] = 2;
    for (int m = 18; m <= 25; m++) h[m] = ($urandom_range(1) != 0) ? 1 : -1;
    for (int m = 40; m <= 46; m++) h[m] = ($urandom_range(1) != 0) ? 1 : -1;
    h[60] = 1;
    offs = '0;
    load_luts();
    cfg = '0;
    cfg.mode = MODE_CE;
    load_cfg(cfg);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    begin
      int t;
      t = 0;
      while (!ce_done && t < 2000) begin @(negedge clk); t++; end
    end
    check(ce_done, "ce_done never rose");
    se = 0.0;
    worst = 0;
    for (int k = 0; k < CE_N; k++) begin
      int e, err;
      dbg_read(k, d);
      d = int'($signed(d[CE_HW-1:0]));
      e = (k <= EMU_TAPS) ? 64 * h[k] : 0;
      err = d - e;
      se += real'(err * err);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      check(err <= 40, $sformatf("tap %0d: estimate %0d, 64*h = %0d", k, d, e));
    end
    $display("CE on a 19-tap profile: RMS error %0.2f, worst %0d (64 = one quarter-r LSB of h)",
             $sqrt(se / real'(CE_N)), worst);
    checks++;
    if (worst == 0) begin
      failures++;
      $display("FAIL: no rounding error at all, the profile does not exercise the quantizer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
