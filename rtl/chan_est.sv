// chan_est: channel estimator working on the Golay channel estimation
// preamble (PCES).
//
// The preamble is eight 64-symbol segments, PostA PreA PostA PreA PostB
// PreB PostB PreB, at four symbols per clock. Only the centre 128 symbols
// of each half (PreA PostA = symbols 64..191, and PreB PostB = symbols
// 320..447) are buffered. Channel taps up to 64 symbols long are therefore
// wrapped cyclically, and the neighbouring fields cause no interference.
// Correlator A starts as soon as its buffer is full and runs while the B
// half arrives. Correlator B follows. A final Sum pass adds the A output of
// correlator A to the B output of correlator B:
//
//   h_est(k) = (r_A (*) a)(k) + (r_B (*) b)(k) = 2N * h_k  (N = 128)
//
// The result, in units of 1/256 of an r LSB per channel tap (12 bits),
// goes into the 128-word CE memory.
//
// Interface: `start` marks the cycle in which r carries preamble block 0
// (symbols 0..3). Block 48 starts correlation A, block 112 starts
// correlation B, and each takes 224 clocks. The 32-clock Sum pass follows,
// and `done` pulses when the CE memory is complete, about 370 clocks after
// `start`. `busy` is high from start to done. The CE memory is read
// combinationally through h_raddr/h_rdata. The correlators' own busy
// outputs (a_busy, b_busy) are left unread: the controller follows their
// done pulses instead, so lint reports the two as unused.
//
// The buffering of the centre portions, the two correlators A and B, their
// 1,792 operations each and the final Sum follow the source design's timing
// diagram. The exact start cycles and the separate CE memory are this
// design's choices.
module chan_est
  import eq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [R_W-1:0] r [P],
  output logic                  busy,
  output logic                  done,
  input  logic [6:0]            h_raddr,
  output logic signed [CE_HW-1:0] h_rdata
);

  localparam int unsigned ROWS  = CE_N / P;       // 32
  localparam int unsigned SEGB  = CE_SEG / P;     // 16 blocks per segment
  localparam int unsigned A_BEG = SEGB;           // block 16
  localparam int unsigned B_BEG = 5 * SEGB;       // block 80

  logic [7:0]  blk;          // preamble block counter
  logic        capturing;    // inside the preamble
  logic        sum_act;
  logic [4:0]  sum_row;
  logic        a_done_seen, b_done_seen;

  logic                    a_wr, b_wr, a_start, b_start;
  logic                    a_busy, b_busy, a_done, b_done;
  logic [4:0]              a_wrow, b_wrow, rd_row;
  logic signed [CE_AW-1:0] a_rd [P];
  logic signed [CE_AW-1:0] b_rd [P];

  logic signed [CE_HW-1:0] hmem [CE_N];

  always_comb begin
    a_wr    = capturing && blk >= 8'(A_BEG) && blk < 8'(A_BEG + ROWS);
    b_wr    = capturing && blk >= 8'(B_BEG) && blk < 8'(B_BEG + ROWS);
    a_wrow  = 5'(blk - 8'(A_BEG));
    b_wrow  = 5'(blk - 8'(B_BEG));
    a_start = capturing && blk == 8'(A_BEG + ROWS);
    b_start = capturing && blk == 8'(B_BEG + ROWS);
    rd_row  = sum_row;
  end

  golay_corr u_corr_a (
    .clk, .rst_n,
    .wr_en (a_wr), .wr_row (a_wrow), .wr_data (r),
    .start (a_start), .busy (a_busy), .done (a_done),
    .rd_row (rd_row), .rd_sel (1'b0), .rd_data (a_rd)
  );

  golay_corr u_corr_b (
    .clk, .rst_n,
    .wr_en (b_wr), .wr_row (b_wrow), .wr_data (r),
    .start (b_start), .busy (b_busy), .done (b_done),
    .rd_row (rd_row), .rd_sel (1'b1), .rd_data (b_rd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk         <= '0;
      capturing   <= 1'b0;
      sum_act     <= 1'b0;
      sum_row     <= '0;
      a_done_seen <= 1'b0;
      b_done_seen <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        blk         <= 8'd1;
        capturing   <= 1'b1;
        busy        <= 1'b1;
        a_done_seen <= 1'b0;
        b_done_seen <= 1'b0;
        sum_act     <= 1'b0;
      end else begin
        if (capturing) begin
          blk <= blk + 1'b1;
          if (blk == 8'(B_BEG + ROWS)) capturing <= 1'b0;
        end
        if (a_done) a_done_seen <= 1'b1;
        if (b_done) b_done_seen <= 1'b1;
        if (busy && !sum_act && a_done_seen && b_done_seen) begin
          sum_act <= 1'b1;
          sum_row <= '0;
          a_done_seen <= 1'b0;
          b_done_seen <= 1'b0;
        end
        if (sum_act) begin
          for (int p = 0; p < P; p++)
            hmem[{sum_row, 2'(p)}] <= CE_HW'(a_rd[p]) + CE_HW'(b_rd[p]);
          sum_row <= sum_row + 1'b1;
          if (sum_row == 5'(ROWS - 1)) begin
            sum_act <= 1'b0;
            busy    <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
    end
  end

  assign h_rdata = hmem[h_raddr];

endmodule
