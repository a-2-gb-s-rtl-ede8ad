// tb_bert: feeds the BERT a PRBS-15 stream (from the testbench's own LFSR
// model) delayed by a chosen number of symbols. Over 14 runs it uses two
// corner cases (delay 37 and the maximum delay 255) and random delays and
// lengths. Errors are injected at random, about one symbol in 40, with
// random gaps in x_valid. After every block the running bit and error
// counts and BERT_done are compared with the testbench's own tally. The
// test checks that counting skips the first 64 symbols, stops at nbits,
// and that done rises exactly then.
module tb_bert;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, x_valid = 0, done;
  logic [P-1:0] x_hat = '0;
  logic [7:0] delay;
  logic [23:0] nbits;
  logic [31:0] bit_cnt, err_cnt;
  int checks = 0, failures = 0;

  bert dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (bits %0d errors %0d)", what, bit_cnt, err_cnt); end
  endtask

  int xs [8000];

  initial begin
    logic [14:0] l;
    l = '1;
    for (int k = 0; k < 8000; k++) begin
      xs[k] = l[14] ^ l[13];
      l = {l[13:0], l[14] ^ l[13]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 14; t++) begin
      int d, nb, nerr, ncmp, nblk;
      // two fixed corner cases, then random delays and lengths
      d = (t == 0) ? 37 : (t == 1) ? 255 : int'($urandom_range(255));
      nb = (t == 0) ? 2000 : 300 + int'($urandom_range(3000));
      delay = 8'(d);
      nbits = 24'(nb);
      start = 1; @(negedge clk); start = 0;
      nerr = 0;
      ncmp = 0;
      nblk = (d + 64 + nb) / 4 + 8;
      for (int b = 0; b < nblk; b++) begin
        while ($urandom_range(7) == 0) begin x_valid = 0; @(negedge clk); end
        x_valid = 1;
        for (int p = 0; p < P; p++) begin
          int k, v;
          bit bad;
          k = 4 * b + p - d;
          v = (k >= 0) ? xs[k] : 0;
          bad = ($urandom_range(39) == 0);
          if (bad) v = !v;
          // the BERT compares symbol 4b+p once 64 + delay symbols have passed
          if (4 * b + p >= d + 64 && ncmp < nb) begin
            ncmp++;
            if (bad) nerr++;
          end
          x_hat[p] = v[0];
        end
        @(negedge clk);
        // running counts after every block
        check(bit_cnt == 32'(ncmp) && err_cnt == 32'(nerr), $sformatf("running counts at block %0d", b));
        check(done == (ncmp >= nb), $sformatf("BERT_done at block %0d", b));
      end
      x_valid = 0;
      @(negedge clk);
      check(bit_cnt == 32'(nb), "final bit count");
      check(err_cnt == 32'(nerr), "final error count");
      check(done, "BERT_done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
