// tb_transmitter: with the noise off, checks every received sample r_k
// against sat4((sum_m h_m x_{k-m} + 2) >>> 2). Here x is the testbench's
// own PRBS-15 model, and r block q is expected TX_LAT + q clocks after
// `start`. With the noise on, it checks that the difference from the clean
// samples has a standard deviation close to the expected 1.155*sigma/4 r
// LSBs.
module tb_transmitter;
  import eq_pkg::*;

  localparam int NBLK = 300;

  logic clk = 0, rst_n = 0, en = 1, start = 0;
  mode_e mode = MODE_DATA;
  logic [7:0] noise_sigma = 0;
  logic lut_we = 0;
  logic [9:0] lut_waddr;
  logic signed [EMU_LW-1:0] lut_wdata;
  logic [P-1:0] x;
  logic signed [R_W-1:0] r [P];
  int checks = 0, failures = 0;

  transmitter dut (.*);

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
  int rc [NBLK*P];

  function automatic int xv(int k);
    return (k < 0) ? 1 : (xs[k] ? -1 : 1);
  endfunction

  function automatic int sat4(int v);
    return v > 7 ? 7 : (v < -8 ? -8 : v);
  endfunction

  initial begin
    logic [14:0] l;
    real sq;
    for (int m = 1; m <= EMU_TAPS; m++) h[m] = 0;
    h[1] = 8; h[3] = -4; h[10] = 2; h[40] = -2; h[71] = 1;
    l = '1;
    for (int k = 0; k < NBLK * P; k++) begin
      xs[k] = l[14] ^ l[13];
      l = {l[13:0], l[14] ^ l[13]};
    end
    for (int k = 0; k < NBLK * P; k++) begin
      int c;
      c = 0;
      for (int m = 1; m <= EMU_TAPS; m++) c += h[m] * xv(k - m);
      rc[k] = sat4((c + 2) >>> 2);
    end
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
    for (int t = 0; t < 2; t++) begin
      noise_sigma = (t == 0) ? 8'd0 : 8'd8;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      // start was in the previous cycle; r block 0 is due TX_LAT clocks after it
      repeat (TX_LAT - 1) @(negedge clk);
      sq = 0;
      for (int b = 0; b < NBLK; b++) begin
        for (int p = 0; p < P; p++) begin
          // the first 18 blocks still see symbols sent before start
          if (t == 0 && b >= 18) begin
            checks++;
            if (int'(r[p]) != rc[4*b+p]) begin
              failures++;
              if (failures < 8) $display("blk %0d lane %0d: got %0d exp %0d", b, p, r[p], rc[4*b+p]);
            end
          end
          if (t == 1 && b >= 18) sq += real'(int'(r[p]) - rc[4*b+p]) ** 2;
        end
        @(negedge clk);
      end
      if (t == 1) begin
        real sd;
        sd = $sqrt(sq / ((NBLK - 18) * P));
        $display("noise sd %f r LSB, expected about %f", sd, 1.155 * 8 / 4);
        checks++;
        if (sd < 0.85 * 1.155 * 8 / 4 || sd > 1.15 * 1.155 * 8 / 4) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
