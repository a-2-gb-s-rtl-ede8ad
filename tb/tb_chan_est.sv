// tb_chan_est: drives a Golay PCES preamble through a short sparse
// channel into the channel estimator and checks the CE memory two ways:
// against the exact sum of the two circular correlations of the buffered
// centre portions, and against 256 * h_k. The second holds exactly because
// the channel here is small enough that r is never saturated. The test also
// checks that `done` arrives at the expected clock.
module tb_chan_est;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [R_W-1:0] r [P];
  logic [6:0] h_raddr = 0;
  logic signed [CE_HW-1:0] h_rdata;
  int checks = 0, failures = 0;

  chan_est dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a7 [CE_N];
  int b7 [CE_N];
  int xs [512];
  int rs [512];
  int h [CE_N];

  task automatic make_pair();
    int a [CE_N];
    int b [CE_N];
    int na [CE_N];
    int nb [CE_N];
    for (int i = 0; i < CE_N; i++) begin a[i] = (i == 0); b[i] = (i == 0); end
    for (int n = 0; n < CE_LOGN; n++) begin
      for (int i = 0; i < CE_N; i++) begin
        int c = GOLAY_C[n] ? 1 : -1;
        na[i] = a[(i - GOLAY_D[n] + CE_N) % CE_N] + c * b[i];
        nb[i] = a[(i - GOLAY_D[n] + CE_N) % CE_N] - c * b[i];
      end
      a = na; b = nb;
    end
    a7 = a; b7 = b;
  endtask

  initial begin
    int cyc, t0;
    make_pair();
    for (int k = 0; k < CE_N; k++) h[k] = 0;
    h[1] = 3; h[4] = -2; h[23] = 1;
    // preamble: PostA PreA PostA PreA PostB PreB PostB PreB, with the
    // transmitted sequences the circular reverses of a7 and b7
    for (int s = 0; s < 512; s++) begin
      int j;
      j = (s + 64) % 128;
      xs[s] = (s < 256) ? a7[(CE_N - j) % CE_N] : b7[(CE_N - j) % CE_N];
    end
    for (int s = 0; s < 512; s++) begin
      int acc;
      acc = 0;
      for (int m = 0; m < 64; m++) acc += h[m] * xs[(s - m + 512) % 512];
      rs[s] = acc;
    end
    for (int p = 0; p < P; p++) r[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cyc = 0;
    for (int b = 0; b < 128; b++) begin
      start = (b == 0);
      for (int p = 0; p < P; p++) r[p] = R_W'(rs[4*b+p]);
      if (b == 0) t0 = cyc;
      @(negedge clk); cyc++;
    end
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    // correlation B starts at block 112 and takes 224 clocks, two clocks to
    // hand over, then 32 clocks of Sum: done is seen 112+224+1+1+32+1 after start
    if (cyc - t0 != 371) begin failures++; $display("done after %0d clocks", cyc - t0); end
    for (int k = 0; k < CE_N; k++) begin
      int ea, eb;
      h_raddr = 7'(k);
      #0.1;
      ea = 0; eb = 0;
      for (int i = 0; i < CE_N; i++) begin
        ea += rs[64 + i] * a7[(k - i + CE_N) % CE_N];
        eb += rs[320 + i] * b7[(k - i + CE_N) % CE_N];
      end
      checks++;
      if (int'(h_rdata) != ea + eb) begin
        failures++;
        if (failures < 8) $display("k %0d: got %0d exp %0d", k, h_rdata, ea + eb);
      end
      checks++;
      if (int'(h_rdata) != 256 * h[k]) begin
        failures++;
        if (failures < 8) $display("k %0d: got %0d, 256*h = %0d", k, h_rdata, 256 * h[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
