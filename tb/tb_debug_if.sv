// tb_debug_if: checks the debug address map. CE memory words come back
// sign-extended, the BERT counters and the status bits appear at 128..130,
// other addresses read zero, and every read takes one clock.
module tb_debug_if;
  import eq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] dbg_addr = 0;
  logic [31:0] dbg_data;
  logic [6:0] ce_raddr;
  logic signed [CE_HW-1:0] ce_rdata;
  logic [31:0] bit_cnt = 32'd123456, err_cnt = 32'd789;
  logic bert_done = 1, ce_busy = 0, ce_done = 1;
  int checks = 0, failures = 0;

  int mem [128];
  assign ce_rdata = CE_HW'(mem[ce_raddr]);

  debug_if dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) mem[i] = int'($urandom_range(4095)) - 2048;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      int e;
      dbg_addr = 8'(a);
      @(negedge clk);
      if (a < 128) e = mem[a];
      else if (a == 128) e = 123456;
      else if (a == 129) e = 789;
      else if (a == 130) e = 5;
      else e = 0;
      checks++;
      if (dbg_data != 32'(e)) begin
        failures++;
        if (failures < 8) $display("addr %0d: got %0d exp %0d", a, dbg_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
