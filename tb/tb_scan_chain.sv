// tb_scan_chain: shifts random words into the scan chain and checks that
// `cfg` only changes on scan_update, takes exactly the shifted word, and
// that the old word comes out on scan_out while the new one goes in.
module tb_scan_chain;

  localparam int W = 83;

  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_update = 0, scan_out;
  logic [W-1:0] cfg;
  int checks = 0, failures = 0;

  scan_chain #(.W(W)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, prev, outw;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < W; i++) word[i] = 1'($urandom_range(1));
      for (int i = 0; i < W; i++) begin
        outw[i] = scan_out;
        scan_en = 1; scan_in = word[i];
        @(negedge clk);
        checks++;
        if (cfg != prev) failures++;
      end
      scan_en = 0;
      checks++;
      if (t > 0 && outw != prev) begin failures++; $display("scan_out word differs"); end
      scan_update = 1; @(negedge clk); scan_update = 0;
      checks++;
      if (cfg != word) begin failures++; $display("cfg %h exp %h", cfg, word); end
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
