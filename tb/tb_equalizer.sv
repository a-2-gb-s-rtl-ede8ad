// tb_equalizer: self-checking test of the complete equalizer loop.
//
// Random coefficients are drawn for the LE (w_1..w_6), the M-DFE
// (h_{L+1..L+24}) and the S-DFE (h_1..h_8), and their DA tables are loaded
// with the LUT equations. Random per-tap offsets are set, and random 4-bit
// samples are driven with random stall cycles. A symbol-by-symbol model
// written straight from the filter equations (direct multiply-adds, no
// LUTs, no lanes) predicts every decision. The test also checks the
// three-clock latency from the first r block to the first valid output.
module tb_equalizer;
  import eq_pkg::*;

  localparam int NBLK = 3000;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [R_W-1:0] r [P];
  logic [B_TAPS*2-1:0] tap_offset;
  logic mdfe_we = 0, le_we = 0, sdfe_we = 0;
  logic [7:0] mdfe_waddr;
  logic signed [Y_W-1:0] mdfe_wdata;
  logic [A_TAPS-1:0] le_waddr;
  logic signed [LE_LW-1:0] le_wdata;
  logic [L_TAPS-1:0] sdfe_waddr;
  logic signed [S_LW-1:0] sdfe_wdata;
  logic [P-1:0] x_hat;
  logic x_valid;

  int checks = 0, failures = 0;

  equalizer dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (40 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int w [1:A_TAPS];
  int hm [0:B_TAPS-1];
  int hs [1:L_TAPS];
  int dpos [B_TAPS];
  int rs [NBLK*P];
  int es [NBLK*P];
  int um [-16:NBLK*P];   // model decisions

  function automatic int satw(int v, int wd);
    int hi = (1 << (wd - 1)) - 1;
    int lo = -(1 << (wd - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic int sym(int b);
    return b ? -1 : 1;
  endfunction

  function automatic int ufn(int k);
    return (k < -16) ? 0 : um[k];
  endfunction

  function automatic int efn(int k);
    return (k < 0) ? 0 : es[k];
  endfunction

  // Model: decisions for symbol k given everything before it.
  task automatic model_step(int k);
    int y, z, s, acc;
    y = 0;
    for (int n = 0; n < B_TAPS; n++) y += hm[n] * sym(ufn(k - L_TAPS - dpos[n]));
    y = satw(y, Y_W);
    es[k] = satw(((rs[k] * 4) - y) >>> 1, E_W);
    acc = 0;
    for (int m = 1; m <= A_TAPS; m++) acc += w[m] * efn(k - m);
    z = satw(acc >>> LE_SHIFT, Z_W);
    s = 0;
    for (int i = 1; i <= L_TAPS; i++) s += hs[i] * sym(ufn(k - i));
    um[k] = (z - s) < 0;
  endtask

  int vblk, first_valid_cyc, cyc, en_cyc0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    cyc = 0;
    for (int p = 0; p < P; p++) r[p] = '0;
    // coefficients
    for (int m = 1; m <= A_TAPS; m++) w[m] = $urandom_range(40) - 20;
    for (int n = 0; n < B_TAPS; n++) hm[n] = $urandom_range(20) - 10;
    for (int i = 1; i <= L_TAPS; i++) hs[i] = $urandom_range(60) - 30;
    for (int n = 0; n < B_TAPS; n++) tap_offset[2*n +: 2] = 2'($urandom_range(3));
    // keep the last tap within reach (D_23 <= 63)
    for (int n = 16; n < B_TAPS; n++) tap_offset[2*n +: 2] = 2'($urandom_range(1));
    begin
      int acc;
      acc = 0;
      for (int n = 0; n < B_TAPS; n++) begin
        acc += ((n == 0) ? 0 : 1) + tap_offset[2*n +: 2];
        if (acc > 63) acc = 63;
        dpos[n] = acc;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the LUTs
    for (int g = 0; g < 4; g++)
      for (int K = 0; K < 64; K++) begin
        int v;
      v = 0;
        for (int i = 0; i < 6; i++) v += hm[6*g+i] * (1 - 2 * ((K >> i) & 1));
        @(negedge clk); mdfe_we = 1; mdfe_waddr = 8'(64*g + K); mdfe_wdata = Y_W'(v);
      end
    for (int K = 0; K < 64; K++) begin
      int v;
      v = 0;
      for (int m = 1; m <= 6; m++) v += w[m] * ((K >> (m - 1)) & 1);
      @(negedge clk); mdfe_we = 0; le_we = 1; le_waddr = 6'(K); le_wdata = LE_LW'(v);
    end
    for (int K = 0; K < 256; K++) begin
      int v;
      v = 0;
      for (int i = 1; i <= 8; i++) v += hs[i] * (1 - 2 * ((K >> (i - 1)) & 1));
      @(negedge clk); le_we = 0; sdfe_we = 1; sdfe_waddr = 8'(K); sdfe_wdata = S_LW'(v);
    end
    @(negedge clk); sdfe_we = 0;
    // random samples
    for (int k = 0; k < NBLK * P; k++) rs[k] = $urandom_range(15) - 8;
    // model: warm-up decisions from z = 0, then the data
    for (int k = -16; k < -8; k++) um[k] = 0;
    for (int k = -8; k < 0; k++) begin
      int s = 0;
      for (int i = 1; i <= L_TAPS; i++) s += hs[i] * sym(ufn(k - i));
      um[k] = (0 - s) < 0;
    end
    for (int k = 0; k < NBLK * P; k++) model_step(k);
    // drive
    en_cyc0 = -1;
    for (int b = 0; b < NBLK; b++) begin
      @(negedge clk);
      if (b > 10) while ($urandom_range(9) == 0) begin
        en = 0;
        @(negedge clk);
      end
      en = 1;
      if (en_cyc0 < 0) en_cyc0 = cyc;
      for (int p = 0; p < P; p++) r[p] = R_W'(rs[4*b+p]);
    end
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      en = 1;
      for (int p = 0; p < P; p++) r[p] = '0;
      @(negedge clk);
    end
    en = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (vblk < NBLK) begin
      failures++;
      $display("only %0d valid blocks", vblk);
    end
    checks++;
    if (first_valid_cyc - en_cyc0 != EQ_LAT) begin
      failures++;
      $display("latency %0d, expected %0d", first_valid_cyc - en_cyc0, EQ_LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial vblk = 0;
  always @(posedge clk) begin
    if (rst_n && x_valid && vblk < NBLK) begin
      if (vblk == 0) first_valid_cyc = cyc;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (int'(x_hat[p]) != um[4*vblk+p]) begin
          failures++;
          if (failures < 10) $display("blk %0d lane %0d: got %0d exp %0d", vblk, p, x_hat[p], um[4*vblk+p]);
        end
      end
      vblk++;
    end
  end

endmodule
