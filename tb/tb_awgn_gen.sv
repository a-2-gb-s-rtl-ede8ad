// tb_awgn_gen: statistical checks of the noise source. With sigma = 0 the
// output is zero. For two sigma values the sample mean is near zero, the
// standard deviation is within 10% of 1.155*sigma, and about 68% of the
// samples fall within one standard deviation, as for a Gaussian. A second
// `start` reproduces the sequence exactly, and the lanes are not copies of
// each other.
module tb_awgn_gen;
  import eq_pkg::*;

  localparam int NS = 4000;

  logic clk = 0, rst_n = 0, en = 0, start = 0;
  logic [7:0] sigma = 0;
  logic signed [N_W-1:0] n [P];
  int checks = 0, failures = 0;

  awgn_gen dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int first [64];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    repeat (50) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) check(n[p] == 0, "zero noise at sigma 0");
    end
    foreach (first[i]) first[i] = 0;
    for (int t = 0; t < 2; t++) begin
      real sum, sq, sd, exp_sd;
      int n_in, same;
      sigma = (t == 0) ? 8'd20 : 8'd100;
      start = 1; @(negedge clk); start = 0;
      sum = 0; sq = 0; same = 0;
      for (int i = 0; i < NS; i++) begin
        @(negedge clk);
        for (int p = 0; p < P; p++) begin
          sum += n[p];
          sq += real'(n[p]) * real'(n[p]);
        end
        if (n[0] == n[1]) same++;
      end
      sd = $sqrt(sq / (NS * P) - (sum / (NS * P)) ** 2);
      exp_sd = 1.155 * sigma;
      $display("sigma %0d: mean %f sd %f (expected about %f)", sigma, sum / (NS * P), sd, exp_sd);
      check(sum / (NS * P) < 0.1 * exp_sd && sum / (NS * P) > -0.1 * exp_sd, "mean near zero");
      check(sd > 0.9 * exp_sd && sd < 1.1 * exp_sd, "standard deviation");
      check(same < NS / 10, "lanes differ");
      // fraction within one sd, and reproducibility after start
      start = 1; @(negedge clk); start = 0;
      n_in = 0;
      for (int i = 0; i < NS; i++) begin
        @(negedge clk);
        if (i < 64 && t == 1) first[i] = n[2];
        for (int p = 0; p < P; p++) if (real'(n[p]) <= sd && real'(n[p]) >= -sd) n_in++;
      end
      check(real'(n_in) / (NS * P) > 0.62 && real'(n_in) / (NS * P) < 0.74, "one-sigma fraction");
    end
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      check(n[2] == first[i], "restart reproduces");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
