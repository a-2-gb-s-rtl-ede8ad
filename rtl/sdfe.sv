// sdfe: loop-unrolled sub-DFE (S-DFE) merged with the four slicers.
//
// The S-DFE cancels the first L = 8 post-cursor taps, which the two-cycle
// main loop cannot reach in time:
//
//   u_k = slice( z_k - S[u_{k-1}, ..., u_{k-8}] ),   slice(v) = (v < 0)
//
// Because the decisions are binary, the eight past decisions form the
// address of a single 256-word LUT holding sum_i h_i * (1 - 2*b_i). Inside a
// block of four, lane p depends on the p earlier lanes, so it evaluates all
// 2^p candidates (1, 2, 4 and 8 LUT reads with the unknown decisions set to
// every value). Each candidate is sliced, and a multiplexer chain then picks
// the right one as the lower lanes resolve. Only that chain of
// multiplexers lies on the decision path from lane 0 to lane 3.
//
// Interface: `z` is the LE output block in Register#2, z_{4c..4c+3}.
// `prev[j]` = u_{4c-1-j} comes from the decision history. `u` is
// combinational. The LUT has 15 read ports and is written with an 8-bit
// address.
//
// The single 256-entry LUT, the loop unrolling over 1/2/4/8 candidates and
// the 10-bit input / 1-bit output follow the source design. Subtracting the
// LUT word (rather than adding a negated one), the 10-bit LUT word and
// slicing zero to +1 are this design's choices.
module sdfe
  import eq_pkg::*;
#(
  parameter int unsigned NT = L_TAPS,
  parameter int unsigned ZW = Z_W,
  parameter int unsigned LW = S_LW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [ZW-1:0] z [P],
  input  logic [NT-1:0]        prev,
  input  logic                 lut_we,
  input  logic [NT-1:0]        lut_waddr,
  input  logic signed [LW-1:0] lut_wdata,
  output logic [P-1:0]         u
);

  // Read port numbering: lane p, candidate s -> port (2^p - 1) + s.
  localparam int unsigned NRD = (1 << P) - 1;

  logic [NT-1:0]        raddr [NRD];
  logic signed [LW-1:0] rdata [NRD];
  logic                 cand  [NRD];

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int s = 0; s < (1 << p); s++)
        for (int i = 1; i <= NT; i++) begin
          // address bit i-1 is u_{4c+p-i}
          if (p - i >= 0) raddr[(1 << p) - 1 + s][i-1] = s[p-i];
          else            raddr[(1 << p) - 1 + s][i-1] = prev[i-p-1];
        end
  end

  da_lut #(.K(NT), .W(LW), .NRD(NRD)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int s = 0; s < (1 << p); s++) begin
        // slicer on z - LUT: 1 (= -1) when negative
        cand[(1 << p) - 1 + s] = (32'(z[p]) < 32'(rdata[(1 << p) - 1 + s]));
      end
  end

  // Multiplexer chain: lane p selects its candidate with the decisions of
  // lanes 0 .. p-1 (lane j's decision is bit j of the select).
  always_comb begin
    logic [P-1:0] dec;
    dec = '0;
    for (int p = 0; p < P; p++) begin
      logic [P-1:0] sel;
      sel = '0;
      for (int j = 0; j < p; j++) sel[j] = dec[j];
      dec[p] = cand[(1 << p) - 1 + int'(sel)];
    end
    u = dec;
  end

endmodule
