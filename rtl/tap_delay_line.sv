// tap_delay_line: decision delay line of the main DFE with dynamic tap
// assignment.
//
// Slicer decisions u_k (1 bit, 1 = -1) enter four per clock. Each of the 24
// M-DFE tap slots reads one delayed decision. Slot n is placed
// D_n symbols behind the first M-DFE position, where
//
//   D_0 = offset_0,   D_n = D_{n-1} + 1 + offset_n,   offset_n in 0..3,
//
// and D_n is limited to SPAN-L-1 = 63. With all offsets zero the slots are
// the contiguous taps L+1 .. L+24. Larger offsets spread them out, so the
// 24 taps can cover the clusters of a channel up to 72 symbols long. For
// output symbol k the slot reads u_{k-L-D_n}; in the pipeline k = 4c+8+p
// when the current decisions are u_{4c..4c+3}.
//
// Interface: `u` is the current decision block (combinational, from the
// slicers). `taps[p][n]` is slot n for lane p. `prev` holds the eight
// decisions before the current block, u_{4c-1-j} at bit j, for the sub-DFE.
// The history shifts by one block on each clock with `en` high, and reset
// clears it to +1.
//
// The 4-register groups of the source design pick a delay of 0..3 extra
// symbols per tap, and tap positions are set by the configuration. Here that
// chain of multiplexers is written as one flat history indexed by the
// prefix sums of the offsets, which gives the same taps. The 2-bit per-tap
// offset and the clamp at 63 are this design's reading.
module tap_delay_line
  import eq_pkg::*;
#(
  parameter int unsigned NT  = B_TAPS,
  parameter int unsigned MAXD = SPAN - L_TAPS - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [P-1:0]      u,
  input  logic [NT*2-1:0]   offset,
  output logic [NT-1:0]     taps [P],
  output logic [L_TAPS-1:0] prev
);

  localparam int unsigned HD = MAXD;     // registered history depth

  logic [HD-1:0]   hist;                 // hist[j] = u_{4c-1-j}
  logic [HD+P-1:0] v;                    // v[d]    = u_{4c+3-d}
  logic [6:0]      dpos [NT];

  always_comb begin
    int unsigned acc;
    acc = 0;
    for (int n = 0; n < NT; n++) begin
      acc = acc + ((n == 0) ? 0 : 1) + 32'(offset[2*n +: 2]);
      if (acc > MAXD) acc = MAXD;
      dpos[n] = 7'(acc);
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) v[p] = u[P-1-p];
    v[HD+P-1:P] = hist;
  end

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int n = 0; n < NT; n++)
        taps[p][n] = v[7'(P - 1 - p) + dpos[n]];
  end

  assign prev = hist[L_TAPS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n)  hist <= '0;
    else if (en) hist <= v[HD-1:0];
  end

endmodule
