// tb_golay_corr: checks the pointer-managed in-place Golay correlator
// against direct circular convolutions with the Golay pair. The testbench
// builds the pair itself from the delay and sign vectors. The test runs
// several random 4-bit input buffers (including all-extreme values) and
// checks that each correlation takes 7 x 32 = 224 clocks.
module tb_golay_corr;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0, busy, done, rd_sel = 0;
  logic [4:0] wr_row = 0, rd_row = 0;
  logic signed [R_W-1:0] wr_data [P];
  logic signed [CE_AW-1:0] rd_data [P];
  int checks = 0, failures = 0;

  golay_corr dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ga [CE_N];
  int gb [CE_N];
  int x [CE_N];

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
    ga = a; gb = b;
  endtask

  initial begin
    int cyc;
    make_pair();
    for (int p = 0; p < P; p++) wr_data[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < CE_N; i++)
        x[i] = (t == 0) ? ((i % 3 == 0) ? -8 : 7) : int'($urandom_range(15)) - 8;
      for (int rw = 0; rw < 32; rw++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 5'(rw);
        for (int p = 0; p < P; p++) wr_data[p] = R_W'(x[4*rw+p]);
      end
      @(negedge clk); wr_en = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 225) begin failures++; $display("correlation took %0d clocks", cyc - 1); end
      for (int s = 0; s < 2; s++)
        for (int rw = 0; rw < 32; rw++) begin
          rd_sel = s[0]; rd_row = 5'(rw);
          #0.1;
          for (int p = 0; p < P; p++) begin
            int k, e;
            k = 4 * rw + p;
            e = 0;
            for (int i = 0; i < CE_N; i++) e += x[i] * (s ? gb[(k - i + CE_N) % CE_N] : ga[(k - i + CE_N) % CE_N]);
            checks++;
            if (int'(rd_data[p]) != e) begin
              failures++;
              if (failures < 8) $display("t%0d sel %0d k %0d: got %0d exp %0d", t, s, k, rd_data[p], e);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
