// tb_sdfe: loads the S-DFE table from random post-cursor taps h_1..h_8
// (C(K) = sum_i h_i (1 - 2 b_i)) and applies random z blocks and decision
// histories. Each block's four decisions must match a sequential
// symbol-by-symbol slicer, u_k = (z_k - sum_i h_i (1 - 2 u_{k-i})) < 0.
// That model does no speculation, so the unrolled candidates and the
// multiplexer chain are checked against plain decision feedback.
module tb_sdfe;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [Z_W-1:0] z [P];
  logic [L_TAPS-1:0] prev;
  logic lut_we = 0;
  logic [L_TAPS-1:0] lut_waddr;
  logic signed [S_LW-1:0] lut_wdata;
  logic [P-1:0] u;
  int checks = 0, failures = 0;

  sdfe dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [1:L_TAPS];

  initial begin
    for (int p = 0; p < P; p++) z[p] = '0;
    prev = '0;
    for (int i = 1; i <= L_TAPS; i++) h[i] = int'($urandom_range(120)) - 60;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int K = 0; K < 256; K++) begin
      int v;
      v = 0;
      for (int i = 1; i <= L_TAPS; i++) v += h[i] * (1 - 2 * ((K >> (i - 1)) & 1));
      @(negedge clk); lut_we = 1; lut_waddr = 8'(K); lut_wdata = S_LW'(v);
    end
    @(negedge clk); lut_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int hist [-8:3];
      prev = L_TAPS'($urandom);
      for (int p = 0; p < P; p++) z[p] = Z_W'(int'($urandom_range(400)) - 200);
      for (int j = 0; j < L_TAPS; j++) hist[-1-j] = int'(prev[j]);
      for (int k = 0; k < P; k++) begin
        int s;
        s = 0;
        for (int i = 1; i <= L_TAPS; i++) s += h[i] * (hist[k-i] ? -1 : 1);
        hist[k] = (int'(z[k]) - s) < 0;
      end
      #0.1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (int'(u[p]) != hist[p]) begin
          failures++;
          if (failures < 8) $display("trial %0d lane %0d: got %0d exp %0d", t, p, u[p], hist[p]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
