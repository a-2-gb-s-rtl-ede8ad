// mem_init: memory initialization logic for the filter LUTs.
//
// An external word-wide bus (we, sel, addr, data) writes the DA tables of
// the channel emulator, the M-DFE, the LE and the S-DFE. The bus is
// registered once, and the write strobe is then steered to the table chosen
// by `sel` (see init_sel_e in eq_pkg). Address and data go to all four
// write ports, each of which takes its own low bits.
//
// Timing: a bus word presented in cycle t is written into its LUT at the
// end of cycle t+1.
//
// Initializing the filter coefficients over a separate data bus follows the
// source design. The bus format and the select encoding are this design's
// choices.
module mem_init
  import eq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_we,
  input  init_sel_e          init_sel,
  input  logic [INIT_AW-1:0] init_addr,
  input  logic [INIT_DW-1:0] init_data,
  output lut_wr_t            wr [4]
);

  logic               we_q;
  init_sel_e          sel_q;
  logic [INIT_AW-1:0] addr_q;
  logic [INIT_DW-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      we_q   <= 1'b0;
      sel_q  <= SEL_EMU;
      addr_q <= '0;
      data_q <= '0;
    end else begin
      we_q   <= init_we;
      sel_q  <= init_sel;
      addr_q <= init_addr;
      data_q <= init_data;
    end
  end

  always_comb begin
    for (int t = 0; t < 4; t++) begin
      wr[t].we   = we_q && (sel_q == init_sel_e'(t));
      wr[t].addr = addr_q;
      wr[t].data = data_q;
    end
  end

endmodule
