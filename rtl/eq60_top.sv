// eq60_top: 60 GHz single-carrier BPSK baseband test chip: a 2 Gb/s
// equalizer, a Golay channel estimator, and the on-chip test transmitter
// that feeds them.
//
// The transmitter (sequence generator, 72-tap channel emulator, AWGN
// generator) produces the 4-bit received samples r_k, four per clock. Two
// operating modes are chosen through the scan chain:
//
//   data mode  The equalizer (LE + M-DFE + S-DFE) equalizes the PRBS
//              stream, and the BERT compares its decisions with a
//              regenerated copy of the PRBS until BERT_done.
//   CE mode    The transmitter sends the Golay preamble, and the channel
//              estimator writes h_est(k) = 256 * h_k into the CE memory.
//
// Interface: `start` begins a run in the configured mode (transmitter,
// BERT, and TX_LAT clocks later the channel estimator). The scan chain
// (scan_en/scan_in/scan_update/scan_out) loads cfg_t. The init bus
// (init_we/init_sel/init_addr/init_data) loads the LUTs of the emulator and
// the three equalizer filters, whose words are computed off chip from the
// coefficients. The debug port reads the CE memory and the BERT counters.
// bert_done, ce_done and the raw decisions x_hat/x_valid are brought out
// as pins. The transmitter's symbol output (tx_x) is left unread, and lint
// reports it as unused: the BERT regenerates the sequence itself, so the
// only link from transmitter to receiver is r, as on a real link.
//
// The block set and the data flow follow the source design's test chip.
// The equalizer is clocked only in data mode. That, the start alignment and
// all bus formats are this design's choices.
module eq60_top
  import eq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               scan_en,
  input  logic               scan_in,
  input  logic               scan_update,
  output logic               scan_out,
  input  logic               init_we,
  input  init_sel_e          init_sel,
  input  logic [INIT_AW-1:0] init_addr,
  input  logic [INIT_DW-1:0] init_data,
  input  logic [7:0]         dbg_addr,
  output logic [31:0]        dbg_data,
  output logic               bert_done,
  output logic               ce_done,
  output logic [P-1:0]       x_hat,
  output logic               x_valid
);

  logic [CFG_W-1:0] cfg_bits;
  cfg_t             cfg;
  lut_wr_t          wr [4];

  logic [P-1:0]          tx_x;
  logic signed [R_W-1:0] r [P];

  logic                    ce_start, ce_busy, ce_done_p, ce_done_q;
  logic [TX_LAT-1:0]       start_d;
  logic [6:0]              ce_raddr;
  logic signed [CE_HW-1:0] ce_rdata;
  logic [31:0]             bit_cnt, err_cnt;

  scan_chain #(.W(CFG_W)) u_scan (
    .clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
    .cfg (cfg_bits)
  );
  assign cfg = cfg_t'(cfg_bits);

  mem_init u_init (
    .clk, .rst_n, .init_we, .init_sel, .init_addr, .init_data, .wr
  );

  transmitter u_tx (
    .clk, .rst_n,
    .en          (1'b1),
    .start       (start),
    .mode        (cfg.mode),
    .noise_sigma (cfg.noise_sigma),
    .lut_we      (wr[SEL_EMU].we),
    .lut_waddr   (wr[SEL_EMU].addr),
    .lut_wdata   (EMU_LW'(wr[SEL_EMU].data)),
    .x           (tx_x),
    .r           (r)
  );

  equalizer u_eq (
    .clk, .rst_n,
    .en         (cfg.mode == MODE_DATA),
    .r          (r),
    .tap_offset (cfg.tap_offset),
    .mdfe_we    (wr[SEL_MDFE].we),
    .mdfe_waddr (wr[SEL_MDFE].addr[7:0]),
    .mdfe_wdata (Y_W'(wr[SEL_MDFE].data)),
    .le_we      (wr[SEL_LE].we),
    .le_waddr   (wr[SEL_LE].addr[A_TAPS-1:0]),
    .le_wdata   (LE_LW'(wr[SEL_LE].data)),
    .sdfe_we    (wr[SEL_SDFE].we),
    .sdfe_waddr (wr[SEL_SDFE].addr[L_TAPS-1:0]),
    .sdfe_wdata (S_LW'(wr[SEL_SDFE].data)),
    .x_hat      (x_hat),
    .x_valid    (x_valid)
  );

  // The preamble's first block reaches r TX_LAT clocks after start.
  always_ff @(posedge clk) begin
    if (!rst_n) start_d <= '0;
    else        start_d <= {start_d[TX_LAT-2:0], start && cfg.mode == MODE_CE};
  end
  assign ce_start = start_d[TX_LAT-1];

  chan_est u_ce (
    .clk, .rst_n,
    .start   (ce_start),
    .r       (r),
    .busy    (ce_busy),
    .done    (ce_done_p),
    .h_raddr (ce_raddr),
    .h_rdata (ce_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || start) ce_done_q <= 1'b0;
    else if (ce_done_p)  ce_done_q <= 1'b1;
  end
  assign ce_done = ce_done_q;

  bert u_bert (
    .clk, .rst_n,
    .start   (start),
    .x_hat   (x_hat),
    .x_valid (x_valid),
    .delay   (cfg.ber_delay),
    .nbits   (cfg.ber_nbits),
    .bit_cnt (bit_cnt),
    .err_cnt (err_cnt),
    .done    (bert_done)
  );

  debug_if u_dbg (
    .clk, .rst_n, .dbg_addr, .dbg_data,
    .ce_raddr, .ce_rdata,
    .bit_cnt, .err_cnt,
    .bert_done,
    .ce_busy,
    .ce_done (ce_done_q)
  );

endmodule
