// le: linear equalizer (LE), a 6-tap FIR over the 6-bit signal e_k built
// with bit-plane distributed arithmetic, four lanes in parallel.
//
//   z_k = sat10( (sum_{m=1..6} w_m * e_{k-m}) >>> 2 )
//
// e is two's complement. Bit plane b of the six inputs e_{k-1..k-6} forms a
// 6-bit address (bit m-1 taken from e_{k-m}) into a 64-word LUT holding
// sum_m w_m * bit_{m-1}(K). The six plane outputs are weighted by 2^b, and
// the sign plane (b = 5) is subtracted. One LUT per bit plane, each with a
// read port per lane, gives the six memory blocks. All six hold the same
// words and are written together.
//
// Interface: `e` is the current block (Register#1 of the equalizer),
// e_{4c..4c+3}. A six-sample history of earlier e values shifts by one
// block on each clock with `en` high. `z` is combinational: z for symbols
// 4c..4c+3, built from e_{k-1} back to e_{k-6}.
//
// The 6 taps, the 6/10-bit input/output, the 6 memory blocks and the 4-way
// parallelism follow the source design. The 8-bit LUT word, the >>>2
// output scaling and the saturation are this design's choices.
module le
  import eq_pkg::*;
#(
  parameter int unsigned NT = A_TAPS,
  parameter int unsigned EW = E_W,
  parameter int unsigned LW = LE_LW,
  parameter int unsigned ZW = Z_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [EW-1:0] e [P],
  input  logic                 lut_we,
  input  logic [NT-1:0]        lut_waddr,
  input  logic signed [LW-1:0] lut_wdata,
  output logic signed [ZW-1:0] z [P]
);

  logic signed [EW-1:0] hist [NT];        // hist[j] = e_{4c-1-j}
  logic signed [EW-1:0] v [NT+P];         // v[d]    = e_{4c+3-d}

  always_comb begin
    for (int p = 0; p < P; p++) v[p] = e[P-1-p];
    for (int j = 0; j < NT; j++) v[P+j] = hist[j];
  end

  logic [NT-1:0]        raddr [EW][P];
  logic signed [LW-1:0] rdata [EW][P];

  always_comb begin
    for (int b = 0; b < EW; b++)
      for (int p = 0; p < P; p++)
        for (int m = 1; m <= NT; m++)
          raddr[b][p][m-1] = v[P-1-p+m][b];
  end

  for (genvar b = 0; b < EW; b++) begin : g_plane
    da_lut #(.K(NT), .W(LW), .NRD(P)) u_lut (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (lut_we),
      .waddr (lut_waddr),
      .wdata (lut_wdata),
      .raddr (raddr[b]),
      .rdata (rdata[b])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int b = 0; b < EW; b++) begin
        if (b == EW - 1) acc = acc - (32'(rdata[b][p]) <<< b);
        else             acc = acc + (32'(rdata[b][p]) <<< b);
      end
      z[p] = ZW'(sat(acc >>> LE_SHIFT, ZW));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NT; j++) hist[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < NT; j++) hist[j] <= v[j];
    end
  end

endmodule
