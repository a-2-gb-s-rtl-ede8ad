// tb_le: loads the LE table from random weights (C(K) = sum_m w_m b_m),
// streams random 6-bit samples with stalls, and checks each z against the
// direct sum sat10((sum_{m=1..6} w_m e_{k-m}) >>> 2). This exercises the
// sign bit plane and the saturation.
module tb_le;
  import eq_pkg::*;

  localparam int NBLK = 1000;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [E_W-1:0] e [P];
  logic lut_we = 0;
  logic [A_TAPS-1:0] lut_waddr;
  logic signed [LE_LW-1:0] lut_wdata;
  logic signed [Z_W-1:0] z [P];
  int checks = 0, failures = 0;

  le dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int w [1:A_TAPS];
  int es [NBLK*P];
  int nsat;

  function automatic int ev(int k);
    return (k < 0) ? 0 : es[k];
  endfunction

  initial begin
    nsat = 0;
    for (int p = 0; p < P; p++) e[p] = '0;
    for (int m = 1; m <= A_TAPS; m++) begin
      w[m] = 15 + int'($urandom_range(6));
      if ($urandom_range(1)) w[m] = -w[m];
    end
    for (int k = 0; k < NBLK * P; k++) es[k] = int'($urandom_range(63)) - 32;
    // Aligned runs drive the sum into both saturation limits.
    for (int c = 10; c < NBLK; c += 50)
      for (int m = 1; m <= A_TAPS; m++)
        es[4*c+1-m+4] = ((w[m] >= 0) == (c % 100 == 10)) ? 31 : -32;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int K = 0; K < 64; K++) begin
      int v;
      v = 0;
      for (int m = 1; m <= A_TAPS; m++) v += w[m] * ((K >> (m - 1)) & 1);
      @(negedge clk); lut_we = 1; lut_waddr = 6'(K); lut_wdata = LE_LW'(v);
    end
    @(negedge clk); lut_we = 0;
    for (int c = 0; c < NBLK; c++) begin
      if (c % 19 == 4) begin en = 0; @(negedge clk); end
      en = 1;
      for (int p = 0; p < P; p++) e[p] = E_W'(es[4*c+p]);
      #0.1;
      for (int p = 0; p < P; p++) begin
        int acc, ez;
        acc = 0;
        for (int m = 1; m <= A_TAPS; m++) acc += w[m] * ev(4 * c + p - m);
        ez = acc >>> 2;
        if (ez > 511) begin ez = 511; nsat++; end
        if (ez < -512) begin ez = -512; nsat++; end
        checks++;
        if (int'(z[p]) != ez) begin
          failures++;
          if (failures < 8) $display("c %0d lane %0d: got %0d exp %0d", c, p, z[p], ez);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
