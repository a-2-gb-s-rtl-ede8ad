// tb_tap_delay_line: streams random decisions with stalls and checks every
// tap slot of every lane against u_{k-L-D_n}, with D_n computed from the
// offsets as a running sum. It also checks the eight `prev` bits. Three
// offset settings are used: all zero (contiguous taps), random, and all
// three (the running sum reaches the 63-symbol clamp).
module tb_tap_delay_line;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [P-1:0] u = '0;
  logic [B_TAPS*2-1:0] offset;
  logic [B_TAPS-1:0] taps [P];
  logic [L_TAPS-1:0] prev;
  int checks = 0, failures = 0;

  tap_delay_line dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int us [0:4000];
  int dpos [B_TAPS];

  function automatic int uv(int k);
    return (k < 0) ? 0 : us[k];
  endfunction

  initial begin
    for (int t = 0; t < 3; t++) begin
      for (int n = 0; n < B_TAPS; n++)
        offset[2*n +: 2] = (t == 0) ? 2'd0 : (t == 1) ? 2'($urandom_range(3)) : 2'd3;
      begin
        int acc;
        acc = 0;
        for (int n = 0; n < B_TAPS; n++) begin
          acc += ((n == 0) ? 0 : 1) + int'(offset[2*n +: 2]);
          if (acc > 63) acc = 63;
          dpos[n] = acc;
        end
      end
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int c = 0; c < 250; c++) begin
        if (c % 17 == 9) begin en = 0; @(negedge clk); end
        for (int p = 0; p < P; p++) begin
          us[4*c+p] = $urandom_range(1);
          u[p] = us[4*c+p][0];
        end
        en = 1;
        #0.1;
        for (int p = 0; p < P; p++)
          for (int n = 0; n < B_TAPS; n++) begin
            int k;
            k = 4 * c + 8 + p;
            checks++;
            if (int'(taps[p][n]) != uv(k - L_TAPS - dpos[n])) begin
              failures++;
              if (failures < 8) $display("t%0d c%0d lane %0d slot %0d wrong", t, c, p, n);
            end
          end
        for (int j = 0; j < L_TAPS; j++) begin
          checks++;
          if (int'(prev[j]) != uv(4 * c - 1 - j)) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
