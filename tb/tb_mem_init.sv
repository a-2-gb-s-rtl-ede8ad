// tb_mem_init: random bus words must appear, one clock later, on the write
// port chosen by `sel` and on no other, with address and data unchanged.
module tb_mem_init;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0, init_we = 0;
  init_sel_e init_sel = SEL_EMU;
  logic [INIT_AW-1:0] init_addr = '0;
  logic [INIT_DW-1:0] init_data = '0;
  lut_wr_t wr [4];
  int checks = 0, failures = 0;

  mem_init dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic we;
      logic [1:0] s;
      logic [INIT_AW-1:0] a;
      logic [INIT_DW-1:0] d;
      we = 1'($urandom_range(1)); s = 2'($urandom_range(3));
      a = INIT_AW'($urandom); d = INIT_DW'($urandom);
      init_we = we; init_sel = init_sel_e'(s); init_addr = a; init_data = d;
      @(negedge clk);
      for (int t = 0; t < 4; t++) begin
        checks++;
        if (wr[t].we != (we && s == 2'(t)) || wr[t].addr != a || wr[t].data != d) begin
          failures++;
          if (failures < 8) $display("word %0d port %0d wrong", i, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
