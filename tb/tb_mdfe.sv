// tb_mdfe: loads the four M-DFE tables from random coefficients with the
// LUT equation C(K) = sum_i h_i (1 - 2 b_i), then applies random tap
// vectors to all four lanes. Each y must equal the direct sum
// sum_n h_n (1 - 2 t_n), saturated to 9 bits. Large coefficients are used
// in the second half so that the saturation is exercised.
module tb_mdfe;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [B_TAPS-1:0] taps [P];
  logic lut_we = 0;
  logic [7:0] lut_waddr;
  logic signed [Y_W-1:0] lut_wdata;
  logic signed [Y_W-1:0] y [P];
  int checks = 0, failures = 0;

  mdfe dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [B_TAPS];
  int nsat;

  initial begin
    nsat = 0;
    for (int p = 0; p < P; p++) taps[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      for (int n = 0; n < B_TAPS; n++) h[n] = (t == 0) ? int'($urandom_range(20)) - 10 : int'($urandom_range(80)) - 40;
      for (int g = 0; g < 4; g++)
        for (int K = 0; K < 64; K++) begin
          int v;
          v = 0;
          for (int i = 0; i < 6; i++) v += h[6*g+i] * (1 - 2 * ((K >> i) & 1));
          @(negedge clk); lut_we = 1; lut_waddr = 8'(64 * g + K); lut_wdata = Y_W'(v);
        end
      @(negedge clk); lut_we = 0;
      for (int i = 0; i < 500; i++) begin
        for (int p = 0; p < P; p++) taps[p] = B_TAPS'($urandom);
        #0.1;
        for (int p = 0; p < P; p++) begin
          int e;
          e = 0;
          for (int n = 0; n < B_TAPS; n++) e += h[n] * (taps[p][n] ? -1 : 1);
          if (e > 255) begin e = 255; nsat++; end
          if (e < -256) begin e = -256; nsat++; end
          checks++;
          if (int'(y[p]) != e) begin
            failures++;
            if (failures < 8) $display("lane %0d: got %0d exp %0d", p, y[p], e);
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
