// eq_pkg: constants, types and helper functions shared by the 60 GHz BPSK
// equalizer test chip.
//
// The datapath is four lanes wide (P = 4). Each clock carries symbols
// 4q+0 .. 4q+3, with lane p holding symbol 4q+p. BPSK symbols are single
// bits: bit 0 stands for +1 and bit 1 for -1. The DA LUT equations use the
// same mapping, (1 - 2b).
//
// The tap counts (A = 6, L = 8, B = 24, 72 emulator taps), the 4-way
// parallelism, the LUT sizes and the word lengths r = 4, y = 9, e = 6 and
// z = 10 bits all follow the source design. These choices are this design's
// own: LUT word widths, the fixed-point scaling, the Golay delay and sign
// vectors, the PRBS polynomial and the init-bus map.
package eq_pkg;

  // ---------------- parallelism and tap counts ----------------
  localparam int unsigned P        = 4;    // lanes per clock
  localparam int unsigned A_TAPS   = 6;    // linear equalizer taps
  localparam int unsigned L_TAPS   = 8;    // sub-DFE taps
  localparam int unsigned B_TAPS   = 24;   // main-DFE taps
  localparam int unsigned SPAN     = 72;   // longest ISI the DFE can reach
  localparam int unsigned EMU_TAPS = 72;   // channel emulator taps
  localparam int unsigned DA_K     = 6;    // address bits of a 64-word DA LUT

  // ---------------- word lengths ----------------
  localparam int unsigned R_W      = 4;    // received sample r_k
  localparam int unsigned Y_W      = 9;    // M-DFE output y_k
  localparam int unsigned E_W      = 6;    // LE input e_k = r_k - y_k
  localparam int unsigned Z_W      = 10;   // LE output z_k
  localparam int unsigned EMU_LW   = 8;    // channel emulator LUT word
  localparam int unsigned C_W      = 12;   // channel emulator output c_k
  localparam int unsigned LE_LW    = 8;    // LE LUT word
  localparam int unsigned LE_SHIFT = 2;    // LE accumulator -> z scaling
  localparam int unsigned S_LW     = 10;   // S-DFE LUT word
  localparam int unsigned N_W      = 11;   // AWGN sample

  // ---------------- pipeline latencies (cycles) ----------------
  localparam int unsigned TX_LAT   = 3;    // start -> first r block
  localparam int unsigned EQ_LAT   = 3;    // r block -> its decisions

  // ---------------- channel estimator ----------------
  localparam int unsigned CE_N     = 128;  // Golay sequence length
  localparam int unsigned CE_LOGN  = 7;
  localparam int unsigned CE_SEG   = 64;   // PCES segment length (symbols)
  localparam int unsigned CE_AW    = R_W + CE_LOGN;   // correlator word, 11
  localparam int unsigned CE_HW    = CE_AW + 1;       // estimate word, 12

  // Golay generator: delays D_n and signs C_n (1 means +1, 0 means -1),
  // n = 1..7 stored at index n-1.
  localparam int unsigned GOLAY_D [CE_LOGN] = '{1, 8, 2, 4, 16, 32, 64};
  localparam bit          GOLAY_C [CE_LOGN] = '{0, 0, 0, 0, 1, 0, 0};

  // ---------------- init bus ----------------
  localparam int unsigned INIT_AW  = 10;
  localparam int unsigned INIT_DW  = 12;

  typedef enum logic [1:0] {
    SEL_EMU  = 2'd0,   // addr = {lut[3:0], word[5:0]}
    SEL_MDFE = 2'd1,   // addr = {lut[1:0], word[5:0]}
    SEL_LE   = 2'd2,   // addr = word[5:0]
    SEL_SDFE = 2'd3    // addr = word[7:0]
  } init_sel_e;

  typedef struct packed {
    logic                     we;
    logic [INIT_AW-1:0]       addr;
    logic [INIT_DW-1:0]       data;
  } lut_wr_t;

  // ---------------- configuration (scan chain) ----------------
  typedef enum logic {
    MODE_DATA = 1'b0,
    MODE_CE   = 1'b1
  } mode_e;

  typedef struct packed {
    mode_e                    mode;         // data or channel estimation
    logic [B_TAPS*2-1:0]      tap_offset;   // per M-DFE tap, 2 bits each
    logic [7:0]               noise_sigma;  // AWGN amplitude, 0 = off
    logic [7:0]               ber_delay;    // BERT alignment, symbols
    logic [23:0]              ber_nbits;    // BERT length, symbols
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  // ---------------- helpers ----------------
  // Circular Golay pair generated from a delta by eqs. (14)-(15):
  // a_n(i) = a_{n-1}(i-D_n) + C_n b_{n-1}(i), b_n(i) = a_{n-1}(i-D_n) - C_n b_{n-1}(i).
  // Returns the symbols as bits (1 = -1). sel_b chooses the b sequence.
  function automatic logic [CE_N-1:0] golay_gen(input bit sel_b);
    int a [CE_N];
    int b [CE_N];
    int na [CE_N];
    int nb [CE_N];
    logic [CE_N-1:0] res;
    for (int i = 0; i < CE_N; i++) begin
      a[i] = (i == 0) ? 1 : 0;
      b[i] = (i == 0) ? 1 : 0;
    end
    for (int n = 0; n < CE_LOGN; n++) begin
      for (int i = 0; i < CE_N; i++) begin
        int ad;
        int cb;
        ad = a[(i - int'(GOLAY_D[n]) + CE_N) % CE_N];
        cb = GOLAY_C[n] ? b[i] : -b[i];
        na[i] = ad + cb;
        nb[i] = ad - cb;
      end
      a = na;
      b = nb;
    end
    for (int i = 0; i < CE_N; i++) res[i] = sel_b ? (b[i] < 0) : (a[i] < 0);
    return res;
  endfunction

  // Transmitted CES sequences: circular time reverses of the generator
  // outputs, so that the generator recursion run on the receive side is
  // their matched filter. ga(i) = a(-i mod N).
  function automatic logic [CE_N-1:0] golay_tx(input bit sel_b);
    logic [CE_N-1:0] g;
    logic [CE_N-1:0] res;
    g = golay_gen(sel_b);
    for (int i = 0; i < CE_N; i++) res[i] = g[(CE_N - i) % CE_N];
    return res;
  endfunction

  // Saturate a signed value to W bits.
  function automatic logic signed [31:0] sat(input logic signed [31:0] v, input int unsigned w);
    logic signed [31:0] hi;
    logic signed [31:0] lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
