// seq_gen: BPSK symbol source, four symbols per clock.
//
// In data mode it emits a PRBS-15 stream (x^15 + x^14 + 1), four successive
// LFSR bits per clock with the oldest bit on lane 0. In channel-estimation
// mode it emits the 512-symbol PCES preamble again and again. The preamble
// is eight 64-symbol segments PostA PreA PostA PreA PostB PreB PostB PreB,
// where PreA/PostA are the first/second halves of the 128-symbol Golay
// sequence a and likewise for b. The cyclic extension around the centre 128
// symbols of each half makes the channel act as a circular convolution
// there.
//
// Interface: `start` (one-cycle pulse) restarts from the all-ones LFSR seed
// and preamble symbol 0: the first block is on `x` in the cycle after
// `start`, and `x` then moves on one block per clock while `en` is high.
// A symbol bit of 1 means -1.
//
// The segment order follows the source design's channel estimator timing
// diagram. The two sequence generators (transmitter and BERT reference) are
// from the source design. The PRBS polynomial, the Golay delay/sign vectors
// and the repeating preamble are this design's choices.
module seq_gen
  import eq_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         start,
  input  mode_e        mode,
  output logic [P-1:0] x
);

  localparam logic [CE_N-1:0] GA = golay_tx(1'b0);
  localparam logic [CE_N-1:0] GB = golay_tx(1'b1);

  logic [14:0]  lfsr;
  logic [8:0]   ces_idx;       // preamble index of the next block's lane 0

  // Four LFSR steps: returns {next state, four output bits}.
  function automatic logic [15+P-1:0] prbs_step(input logic [14:0] st);
    logic [14:0] s;
    logic [P-1:0] b;
    s = st;
    for (int p = 0; p < P; p++) begin
      b[p] = s[14] ^ s[13];
      s = {s[13:0], s[14] ^ s[13]};
    end
    return {s, b};
  endfunction

  function automatic logic [P-1:0] ces_block(input logic [8:0] idx);
    logic [P-1:0] b;
    for (int p = 0; p < P; p++) begin
      logic [8:0] s;
      logic [6:0] j;
      s = idx + 9'(p);
      j = 7'(s[6:0] + 7'(CE_SEG));   // (s + 64) mod 128
      b[p] = s[8] ? GB[j] : GA[j];
    end
    return b;
  endfunction

  logic [14:0]  st_cur;
  logic [8:0]   idx_cur;
  logic [15+P-1:0] step;

  // On start the block is taken from the seed, otherwise from the state.
  assign st_cur  = start ? 15'h7fff : lfsr;
  assign idx_cur = start ? 9'd0 : ces_idx;
  assign step    = prbs_step(st_cur);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr    <= '1;
      ces_idx <= '0;
      x       <= '0;
    end else if (start || en) begin
      lfsr    <= step[15+P-1:P];
      ces_idx <= idx_cur + 9'(P);
      x       <= (mode == MODE_CE) ? ces_block(idx_cur) : step[P-1:0];
    end
  end

endmodule
