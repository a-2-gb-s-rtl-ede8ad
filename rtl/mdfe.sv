// mdfe: main decision-feedback filter (M-DFE), a 24-tap FIR over binary
// decisions built with distributed arithmetic, four lanes in parallel.
//
//   y_k = sum_{n=0..23} h_{L+1+n} * (1 - 2*t_{k,n})
//
// Here t_{k,n} is the decision in tap slot n (from tap_delay_line). The
// slots are cut into four groups of six. Group g owns a 64-word LUT whose
// address bit i is slot 6g+i. The word for address K is
// sum_i h_{L+1+6g+i} * (1 - 2*bit_i(K)), which is loaded over the init bus
// and computed off the datapath. Each lane reads the four LUTs through its
// own port and adds the four words. The result is saturated to 9 bits.
//
// Interface: taps[p] are the slot bits of lane p. y[p] is combinational and
// has the same scale as the LUT words (a quarter of an r LSB). The LUTs are
// written with lut_waddr = {group[1:0], word[5:0]}.
//
// The four 64-word LUTs, their sharing by the four parallel branches (4
// memories, not 16), and the 1-bit input / 9-bit output follow the source
// design. The 9-bit LUT word and the saturation are this design's choices.
module mdfe
  import eq_pkg::*;
#(
  parameter int unsigned NT = B_TAPS,
  parameter int unsigned YW = Y_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NT-1:0]        taps [P],
  input  logic                 lut_we,
  input  logic [7:0]           lut_waddr,
  input  logic signed [YW-1:0] lut_wdata,
  output logic signed [YW-1:0] y [P]
);

  localparam int unsigned NLUT = NT / DA_K;

  logic [DA_K-1:0]      raddr [NLUT][P];
  logic signed [YW-1:0] rdata [NLUT][P];

  always_comb begin
    for (int g = 0; g < NLUT; g++)
      for (int p = 0; p < P; p++)
        raddr[g][p] = taps[p][DA_K*g +: DA_K];
  end

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    da_lut #(.K(DA_K), .W(YW), .NRD(P)) u_lut (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (lut_we && lut_waddr[7:6] == 2'(g)),
      .waddr (lut_waddr[5:0]),
      .wdata (lut_wdata),
      .raddr (raddr[g]),
      .rdata (rdata[g])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int g = 0; g < NLUT; g++) acc = acc + 32'(rdata[g][p]);
      y[p] = YW'(sat(acc, YW));
    end
  end

endmodule
