// awgn_gen: pseudo-random noise source for the on-chip test transmitter,
// one sample per lane per clock.
//
// Each lane runs its own 32-bit xorshift generator (x ^= x<<13; x ^= x>>17;
// x ^= x<<5) from a distinct seed. The four bytes of the state are summed,
// which gives a bell-shaped value in 0..1020 (central limit theorem). It is
// centred by subtracting 510, scaled by the 8-bit `sigma`, and shifted right
// by 7. The standard deviation is about 1.155*sigma output LSBs. sigma = 0
// turns the noise off.
//
// Interface: `start` reseeds all lanes. `n` is registered and moves on one
// sample per clock while `en` is high.
//
// The source design names an AWGN generator but does not describe its
// insides. This generator, its seeds and its scaling are this design's own.
module awgn_gen
  import eq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                start,
  input  logic [7:0]          sigma,
  output logic signed [N_W-1:0] n [P]
);

  localparam logic [31:0] SEED [4] = '{32'h1234_5678, 32'h9e37_79b9, 32'hdead_beef, 32'h0bad_cafe};

  logic [31:0] st [P];

  function automatic logic [31:0] xs32(input logic [31:0] a);
    logic [31:0] t;
    t = a ^ (a << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      for (int p = 0; p < P; p++) begin
        st[p] <= SEED[p % 4];
        n[p]  <= '0;
      end
    end else if (en) begin
      for (int p = 0; p < P; p++) begin
        logic [31:0] s;
        logic signed [11:0] u;
        logic signed [20:0] prod;
        s = xs32(st[p]);
        st[p] <= s;
        u = 12'(s[7:0]) + 12'(s[15:8]) + 12'(s[23:16]) + 12'(s[31:24]) - 12'sd510;
        prod = 21'(u) * $signed({13'd0, sigma});
        n[p] <= N_W'(prod >>> 7);
      end
    end
  end

endmodule
