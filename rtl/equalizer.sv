// equalizer: hybrid LE / DFE equalizer for 60 GHz BPSK, 2 Gb/s as four
// 500 MHz lanes.
//
// The main DFE output is subtracted at the equalizer input, before the
// linear equalizer, so the channel estimate can be used directly as the
// DFE coefficients:
//
//   e_k = sat6( ((r_k <<< 2) - y_k) >>> 1 )         Register#1
//   z_k = LE(e_{k-1} .. e_{k-6})                     Register#2
//   u_k = slice( z_k - S-DFE(u_{k-1} .. u_{k-8}) )   loop-unrolled
//   y_k = M-DFE(u_{k-L-D_0}, ..., u_{k-L-D_23})      dynamic taps
//
// (r: 4 bits, y: 9 bits in quarter-r LSBs, e: 6 bits in half-r LSBs,
// z: 10 bits.) The feedback loop Register#1 -> LE -> Register#2 ->
// slicers -> M-DFE -> subtract -> Register#1 takes two clocks, which is
// eight symbols. The eight nearest post-cursors are therefore left to the
// S-DFE, whose loop closes inside one clock through the multiplexer chain.
// With r block c entering in cycle c, e block c is in Register#1 in cycle
// c+1 and z block c is in Register#2 in cycle c+2. The decisions of block
// c are formed in cycle c+2 and feed the y of r block c+2 in the same
// cycle. Decisions leave through an output register, three clocks after
// their r block entered (EQ_LAT = 3).
//
// Interface: `r` and `en` (one block per clock while high; everything holds
// while low). x_hat holds the registered decisions (bit 1 = -1). x_valid is
// high for one cycle when x_hat holds a new block of r data. It stays low
// for the two blocks the pipeline makes before the first r block.
// tap_offset places the M-DFE taps (see tap_delay_line). Three LUT write
// ports load the M-DFE, LE and S-DFE tables.
//
// The structure, the tap counts, the word lengths of r, y, e and z, and the
// Register#1/Register#2 placement follow the source design. The
// fixed-point alignment between r, y and e, and the exact symbol indexing,
// are this design's choices.
module equalizer
  import eq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [R_W-1:0] r [P],
  input  logic [B_TAPS*2-1:0]  tap_offset,
  input  logic                 mdfe_we,
  input  logic [7:0]           mdfe_waddr,
  input  logic signed [Y_W-1:0] mdfe_wdata,
  input  logic                 le_we,
  input  logic [A_TAPS-1:0]    le_waddr,
  input  logic signed [LE_LW-1:0] le_wdata,
  input  logic                 sdfe_we,
  input  logic [L_TAPS-1:0]    sdfe_waddr,
  input  logic signed [S_LW-1:0] sdfe_wdata,
  output logic [P-1:0]         x_hat,
  output logic                 x_valid
);

  logic signed [Y_W-1:0] y   [P];
  logic signed [E_W-1:0] e1  [P];     // Register#1
  logic signed [Z_W-1:0] z   [P];
  logic signed [Z_W-1:0] z2  [P];     // Register#2
  logic [P-1:0]          u;
  logic [B_TAPS-1:0]     taps [P];
  logic [L_TAPS-1:0]     prev;
  logic [EQ_LAT-2:0]     vpipe;

  // Input subtraction and Register#1
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) e1[p] <= '0;
    end else if (en) begin
      for (int p = 0; p < P; p++) begin
        logic signed [31:0] d;
        d = ((32'(r[p]) <<< 2) - 32'(y[p])) >>> 1;
        e1[p] <= E_W'(sat(d, E_W));
      end
    end
  end

  le u_le (
    .clk, .rst_n, .en,
    .e         (e1),
    .lut_we    (le_we),
    .lut_waddr (le_waddr),
    .lut_wdata (le_wdata),
    .z         (z)
  );

  // Register#2
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) z2[p] <= '0;
    end else if (en) begin
      z2 <= z;
    end
  end

  sdfe u_sdfe (
    .clk, .rst_n,
    .z         (z2),
    .prev      (prev),
    .lut_we    (sdfe_we),
    .lut_waddr (sdfe_waddr),
    .lut_wdata (sdfe_wdata),
    .u         (u)
  );

  tap_delay_line u_tdl (
    .clk, .rst_n, .en,
    .u      (u),
    .offset (tap_offset),
    .taps   (taps),
    .prev   (prev)
  );

  mdfe u_mdfe (
    .clk, .rst_n,
    .taps      (taps),
    .lut_we    (mdfe_we),
    .lut_waddr (mdfe_waddr),
    .lut_wdata (mdfe_wdata),
    .y         (y)
  );

  // Output register and valid pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_hat   <= '0;
      x_valid <= 1'b0;
      vpipe   <= '0;
    end else begin
      x_valid <= en && vpipe[EQ_LAT-2];
      if (en) begin
        x_hat <= u;
        vpipe <= {vpipe[EQ_LAT-3:0], 1'b1};
      end
    end
  end

endmodule
