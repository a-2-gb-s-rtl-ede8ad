// bert: bit error rate tester at the equalizer output.
//
// A second sequence generator regenerates the transmitted PRBS from the
// same seed, stepping one block per valid decision block. Decision
// u_{4j+p} of valid block j is compared with the reference symbol
// x_{4j+p-delay}, taken from a history of reference symbols. `delay` is
// the configured end-to-end symbol delay (channel main-tap position plus
// the LE delay). The first WARM symbols are skipped while the DFE history
// fills. Compared symbols and mismatches are counted until `nbits` symbols
// have been compared. Then `done` (BERT_done) rises and stays high until
// the next `start`.
//
// Interface: `start` is the same pulse that starts the transmitter.
// x_hat/x_valid come from the equalizer. The counts are readable at any
// time (debug interface).
//
// The BERT with its own sequence generator and the BERT_done flag follow
// the source design. The delay history, the warm-up skip and the counter
// widths are this design's choices.
module bert
  import eq_pkg::*;
#(
  parameter int unsigned MAXD = 256,
  parameter int unsigned WARM = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [P-1:0] x_hat,
  input  logic         x_valid,
  input  logic [7:0]   delay,
  input  logic [23:0]  nbits,
  output logic [31:0]  bit_cnt,
  output logic [31:0]  err_cnt,
  output logic         done
);

  logic [P-1:0]      ref_blk;
  logic [MAXD-1:0]   hist;          // hist[j] = x_{4j0-1-j}
  logic [MAXD+P-1:0] v;             // v[d]    = x_{4j0+3-d}
  logic [31:0]       sym_base;      // 4j of the current valid block

  seq_gen u_ref (
    .clk, .rst_n,
    .en    (x_valid),
    .start (start),
    .mode  (MODE_DATA),
    .x     (ref_blk)
  );

  always_comb begin
    for (int p = 0; p < P; p++) v[p] = ref_blk[P-1-p];
    v[MAXD+P-1:P] = hist;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      hist     <= '0;
      sym_base <= '0;
      bit_cnt  <= '0;
      err_cnt  <= '0;
      done     <= 1'b0;
    end else if (x_valid) begin
      logic [31:0] nb;
      logic [31:0] ne;
      nb = bit_cnt;
      ne = err_cnt;
      for (int p = 0; p < P; p++) begin
        logic [31:0] idx;
        idx = sym_base + 32'(p);
        if (!done && nb < 32'(nbits) && idx >= 32'(delay) + 32'(WARM)) begin
          nb = nb + 1;
          if (x_hat[p] != v[P-1-p+int'(delay)]) ne = ne + 1;
        end
      end
      bit_cnt  <= nb;
      err_cnt  <= ne;
      done     <= done || (nb >= 32'(nbits));
      hist     <= v[MAXD-1:0];
      sym_base <= sym_base + 32'(P);
    end
  end

endmodule
