// tb_seq_gen: checks the PRBS-15 output against a bit-serial LFSR model.
// It checks the preamble against the segment order PostA PreA PostA PreA
// PostB PreB PostB PreB, built from the testbench's own Golay pair. It also
// checks that the two transmitted sequences are complementary: their
// periodic autocorrelations add to 2N at lag 0 and to 0 elsewhere.
module tb_seq_gen;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, start = 0;
  mode_e mode = MODE_DATA;
  logic [P-1:0] x;
  int checks = 0, failures = 0;

  seq_gen dut (.*);

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

  task automatic expect_bit(int got, int exp, string what, int idx);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 8) $display("%s %0d: got %0d exp %0d", what, idx, got, exp);
    end
  endtask

  initial begin
    logic [14:0] l;
    int ta [CE_N];
    int tb [CE_N];
    make_pair();
    for (int i = 0; i < CE_N; i++) begin
      ta[i] = a7[(CE_N - i) % CE_N];
      tb[i] = b7[(CE_N - i) % CE_N];
    end
    // complementary property of the transmitted pair
    for (int k = 0; k < CE_N; k++) begin
      int s;
      s = 0;
      for (int i = 0; i < CE_N; i++) s += ta[i] * ta[(i + k) % CE_N] + tb[i] * tb[(i + k) % CE_N];
      expect_bit(s, (k == 0) ? 2 * CE_N : 0, "autocorrelation", k);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // data mode
    @(negedge clk); start = 1; en = 1;
    l = '1;
    @(negedge clk); start = 0;
    for (int b = 0; b < 300; b++) begin
      for (int p = 0; p < P; p++) begin
        expect_bit(int'(x[p]), int'(l[14] ^ l[13]), "prbs", 4 * b + p);
        l = {l[13:0], l[14] ^ l[13]};
      end
      // hold for a cycle now and then
      if (b % 37 == 5) begin en = 0; @(negedge clk); en = 1; end
      @(negedge clk);
    end
    // preamble mode, twice round
    mode = MODE_CE; start = 1;
    @(negedge clk); start = 0;
    for (int s = 0; s < 1024; s += 4) begin
      for (int p = 0; p < P; p++) begin
        int q, j, v;
        q = (s + p) % 512;
        j = (q + 64) % 128;
        v = (q < 256) ? ta[j] : tb[j];
        expect_bit(int'(x[p]), (v < 0) ? 1 : 0, "pces", q);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
