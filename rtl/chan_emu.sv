// chan_emu: on-chip channel emulator, a 72-tap FIR over BPSK symbols built
// with distributed arithmetic (DA), four symbols per clock.
//
//   c_k = sum_{m=1..72} h_m * x_{k-m}     (x_k = +1 or -1)
//
// The 72 taps are split into 12 groups of 6. Group j owns a 64-word LUT
// whose address bit i-1 is the symbol x_{k-6j-i}. The LUT word for address
// K is sum_i h_{6j+i} * (1 - 2*b_i), so one read per group replaces six
// multiply-adds. The four lanes are four copies of the same datapath with
// time-shifted addresses, and they read the shared LUTs through four ports
// each. The 12 partial sums are added and registered.
//
// Interface: x (lane p = symbol 4q+p) is taken on each clock with en high.
// c for that block is registered and valid one clock later. The LUTs are
// written over the init bus: waddr = {group[3:0], word[5:0]}.
//
// The tap count, the 12 x 64-word LUT split and the 4-way parallel DA
// structure follow the source design. The 8-bit LUT word, the 12-bit output
// (no overflow possible) and the reset of the symbol history to +1 are this
// design's choices.
module chan_emu
  import eq_pkg::*;
#(
  parameter int unsigned TAPS = EMU_TAPS,
  parameter int unsigned LW   = EMU_LW,
  parameter int unsigned CW   = C_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [P-1:0]         x,
  input  logic                 lut_we,
  input  logic [9:0]           lut_waddr,
  input  logic signed [LW-1:0] lut_wdata,
  output logic signed [CW-1:0] c [P]
);

  localparam int unsigned NLUT = TAPS / DA_K;
  localparam int unsigned HD   = TAPS;          // history depth

  logic [HD-1:0]  hist;      // hist[j] = x_{4q-1-j}
  logic [HD+P-1:0] v;        // v[d] = x_{4q+3-d}

  always_comb begin
    for (int p = 0; p < P; p++) v[p] = x[P-1-p];
    v[HD+P-1:P] = hist;
  end

  logic [DA_K-1:0]     raddr [NLUT][P];
  logic signed [LW-1:0] rdata [NLUT][P];

  always_comb begin
    for (int j = 0; j < NLUT; j++)
      for (int p = 0; p < P; p++)
        for (int i = 1; i <= DA_K; i++)
          raddr[j][p][i-1] = v[P-1-p+DA_K*j+i];
  end

  for (genvar j = 0; j < NLUT; j++) begin : g_lut
    da_lut #(.K(DA_K), .W(LW), .NRD(P)) u_lut (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (lut_we && lut_waddr[9:6] == 4'(j)),
      .waddr (lut_waddr[5:0]),
      .wdata (lut_wdata),
      .raddr (raddr[j]),
      .rdata (rdata[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist <= '0;
      for (int p = 0; p < P; p++) c[p] <= '0;
    end else if (en) begin
      hist <= v[HD-1:0];
      for (int p = 0; p < P; p++) begin
        logic signed [CW-1:0] acc;
        acc = '0;
        for (int j = 0; j < NLUT; j++) acc = acc + CW'(rdata[j][p]);
        c[p] <= acc;
      end
    end
  end

endmodule
