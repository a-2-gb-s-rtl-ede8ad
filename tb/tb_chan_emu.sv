// tb_chan_emu: loads the 12 DA tables of the channel emulator from a random
// 72-tap response, drives random symbols with stall cycles, and compares
// every output with the direct convolution c_k = sum h_m x_{k-m} (symbols
// before the first block count as +1). The output is checked one clock
// after its block.
module tb_chan_emu;
  import eq_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, rst_n = 0, en = 0;
  logic [P-1:0] x;
  logic lut_we = 0;
  logic [9:0] lut_waddr;
  logic signed [EMU_LW-1:0] lut_wdata;
  logic signed [C_W-1:0] c [P];
  int checks = 0, failures = 0;

  chan_emu dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [1:EMU_TAPS];
  int xs [NBLK*P];

  function automatic int xv(int k);
    return (k < 0) ? 1 : (xs[k] ? -1 : 1);
  endfunction

  initial begin
    for (int m = 1; m <= EMU_TAPS; m++) h[m] = int'($urandom_range(40)) - 20;
    for (int k = 0; k < NBLK * P; k++) xs[k] = $urandom_range(1);
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 12; j++)
      for (int K = 0; K < 64; K++) begin
        int v;
        v = 0;
        for (int i = 1; i <= 6; i++) v += h[6*j+i] * (1 - 2 * ((K >> (i - 1)) & 1));
        @(negedge clk); lut_we = 1; lut_waddr = 10'(64 * j + K); lut_wdata = EMU_LW'(v);
      end
    @(negedge clk); lut_we = 0;
    for (int b = 0; b < NBLK; b++) begin
      if (b % 13 == 7) begin en = 0; @(negedge clk); end
      en = 1;
      for (int p = 0; p < P; p++) x[p] = xs[4*b+p];
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        int e;
        e = 0;
        for (int m = 1; m <= EMU_TAPS; m++) e += h[m] * xv(4 * b + p - m);
        checks++;
        if (int'(c[p]) != e) begin
          failures++;
          if (failures < 8) $display("blk %0d lane %0d: got %0d exp %0d", b, p, c[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
