// da_lut: multi-ported look-up table for the distributed-arithmetic (DA)
// filters.
//
// The table holds 2**K signed words of W bits in flip-flops. One write port
// is loaded from the coefficient init bus while the filter is idle. NRD
// combinational read ports are plain multiplexers on the register outputs,
// so a 4-way parallel filter reads one shared table with four ports instead
// of keeping four copies. Building the LUTs from D-FFs and MUXs, and sharing
// one multi-ported memory between the parallel branches, follows the source
// design. The synchronous active-low reset that clears the table is this
// design's choice.
//
// Timing: a write lands on the rising edge. Reads are combinational and see
// the new word from the next cycle on.
module da_lut #(
  parameter int unsigned K   = 6,    // address bits
  parameter int unsigned W   = 9,    // word width
  parameter int unsigned NRD = 4     // read ports
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [K-1:0]        waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [K-1:0]        raddr [NRD],
  output logic signed [W-1:0] rdata [NRD]
);

  logic signed [W-1:0] mem [2**K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**K; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rdata[r] = mem[raddr[r]];
  end

endmodule
