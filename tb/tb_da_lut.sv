// tb_da_lut: writes random words to a 64 x 9 table and reads them back
// through all four ports at random addresses. It also checks that reset
// clears the table and that a write is visible from the next clock.
module tb_da_lut;

  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = 0;
  logic signed [8:0] wdata = 0;
  logic [5:0] raddr [4];
  logic signed [8:0] rdata [4];
  int checks = 0, failures = 0;

  da_lut #(.K(6), .W(9), .NRD(4)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_mem [64];

  initial begin
    for (int p = 0; p < 4; p++) raddr[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      raddr[a % 4] = 6'(a);
      #0.1;
      checks++;
      if (rdata[a % 4] != 0) failures++;
    end
    for (int i = 0; i < 64; i++) ref_mem[i] = 0;
    for (int i = 0; i < 400; i++) begin
      we = 1'($urandom_range(1));
      waddr = 6'($urandom_range(63));
      wdata = 9'($urandom_range(511));
      @(negedge clk);
      if (we) ref_mem[waddr] = int'(wdata);
      for (int p = 0; p < 4; p++) raddr[p] = 6'($urandom_range(63));
      if (i % 5 == 0) raddr[1] = waddr;
      #0.1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(rdata[p]) != ref_mem[raddr[p]]) begin
          failures++;
          if (failures < 8) $display("port %0d addr %0d: got %0d exp %0d", p, raddr[p], rdata[p], ref_mem[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
