// debug_if: low-speed debug read port.
//
// One registered read multiplexer over the results a tester reads back
// after a run:
//
//   dbg_addr 0..127  channel estimate h_est(k), sign-extended (CE memory)
//   dbg_addr 128     BERT compared-symbol count
//   dbg_addr 129     BERT error count
//   dbg_addr 130     status: bit 0 BERT_done, bit 1 CE busy, bit 2 CE done
//                    since last start
//   other            0
//
// Timing: dbg_data shows the word for the address presented one clock
// earlier. ce_raddr goes to the CE memory's combinational read port.
//
// A debug interface for reading the BERT counts and internal results
// follows the source design. The address map is this design's choice.
module debug_if
  import eq_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              dbg_addr,
  output logic [31:0]             dbg_data,
  output logic [6:0]              ce_raddr,
  input  logic signed [CE_HW-1:0] ce_rdata,
  input  logic [31:0]             bit_cnt,
  input  logic [31:0]             err_cnt,
  input  logic                    bert_done,
  input  logic                    ce_busy,
  input  logic                    ce_done
);

  assign ce_raddr = dbg_addr[6:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dbg_data <= '0;
    end else begin
      if (!dbg_addr[7])           dbg_data <= 32'(ce_rdata);
      else if (dbg_addr == 8'd128) dbg_data <= bit_cnt;
      else if (dbg_addr == 8'd129) dbg_data <= err_cnt;
      else if (dbg_addr == 8'd130) dbg_data <= {29'd0, ce_done, ce_busy, bert_done};
      else                         dbg_data <= '0;
    end
  end

endmodule
