// transmitter: on-chip test transmitter that stands in for the radio link.
//
// A sequence generator produces BPSK symbols x_k (PRBS data or the Golay
// preamble). The channel emulator convolves them with the 72-tap impulse
// response held in its LUTs, and the AWGN generator adds noise. The sum is
// rounded to the receiver's 4-bit sample:
//
//   r_k = sat4( (c_k + n_k + 2) >>> 2 )
//
// So c_k, n_k and the channel LUT words are in units of a quarter of an
// r LSB.
//
// Timing, with `start` in cycle 0 and en held high: x for block 0 is valid
// in cycle 1, c in cycle 2 and r in cycle 3 (TX_LAT = 3). Block q follows q
// cycles later. Because c_k starts at tap m = 1, r_k carries h_m*x_{k-m}.
//
// The block structure (sequence generator, channel emulator, AWGN
// generator, adder) follows the source design. The rounding to 4 bits and
// the pipeline registers are this design's choices.
module transmitter
  import eq_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 start,
  input  mode_e                mode,
  input  logic [7:0]           noise_sigma,
  input  logic                 lut_we,
  input  logic [9:0]           lut_waddr,
  input  logic signed [EMU_LW-1:0] lut_wdata,
  output logic [P-1:0]         x,
  output logic signed [R_W-1:0] r [P]
);

  logic signed [C_W-1:0] c [P];
  logic signed [N_W-1:0] n [P];

  seq_gen u_seq (
    .clk, .rst_n, .en, .start, .mode, .x
  );

  chan_emu u_emu (
    .clk, .rst_n, .en, .x,
    .lut_we, .lut_waddr, .lut_wdata,
    .c
  );

  awgn_gen u_awgn (
    .clk, .rst_n, .en, .start,
    .sigma (noise_sigma),
    .n
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) r[p] <= '0;
    end else if (en) begin
      for (int p = 0; p < P; p++) begin
        logic signed [31:0] s;
        s = (32'(c[p]) + 32'(n[p]) + 32'sd2) >>> 2;
        r[p] <= R_W'(sat(s, R_W));
      end
    end
  end

endmodule
