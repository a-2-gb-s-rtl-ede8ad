// golay_corr: 128-point circular Golay correlator on a P-bank buffer.
//
// The buffer holds two sequences, A and B, both loaded with the same 128
// received samples. Seven butterfly stages then run the Golay recursion
//
//   A_n(i) = A_{n-1}(i - D_n) + C_n * B_{n-1}(i)
//   B_n(i) = A_{n-1}(i - D_n) - C_n * B_{n-1}(i)        (i mod 128)
//
// which leaves A_7 = r (*) a and B_7 = r (*) b (circular convolutions with
// the Golay pair the recursion generates from a delta). The transmitted
// CES sequences are the circular time reverses of a and b, so A_7 and B_7
// are their correlations with r. That is 2 x 896 add/subtract operations
// (1,792) per 128-point correlation, against 128 x 128 for a direct
// correlator.
//
// The buffer is P = 4 banks (cells) of 32 words, symbol i sitting in bank
// i mod 4, row i / 4. One row of four butterflies is done per clock, in
// place. A_n(i) is written back where A_{n-1}(i - D_n) was read, so a delay
// never moves data. It only moves the A read pointer, by D_n, modulo 128.
// For a delay that is a multiple of 4 this is a row offset. Otherwise each
// bank gets its own row address and the four words are rotated across the
// lanes: the swap-and-partial-shift of the buffer, done by pointer
// management. Every bank is accessed exactly once per clock.
//
// Interface: while idle, wr_en writes wr_data (four samples, lane p =
// symbol 4*wr_row+p) into row wr_row of both A and B. A pulse on `start`
// runs 7 x 32 = 224 clocks with busy high, then `done` pulses for one
// clock. rd_row/rd_sel read four results combinationally (rd_sel 0: A_7,
// 1: B_7), in logical order through the same pointer.
//
// The P-bank organisation, the circular delays and the pointer management
// follow the source design. The flip-flop banks (standing in for its SRAM
// cells), the in-place write-back and one row per clock are this design's
// choices.
module golay_corr
  import eq_pkg::*;
#(
  parameter int unsigned N    = CE_N,
  parameter int unsigned LOGN = CE_LOGN,
  parameter int unsigned IW   = R_W,
  parameter int unsigned AW   = IW + LOGN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N/P)-1:0] wr_row,
  input  logic signed [IW-1:0] wr_data [P],
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic [$clog2(N/P)-1:0] rd_row,
  input  logic                 rd_sel,
  output logic signed [AW-1:0] rd_data [P]
);

  localparam int unsigned ROWS = N / P;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned IXW  = $clog2(N);

  logic signed [AW-1:0] mem_a [P][ROWS];
  logic signed [AW-1:0] mem_b [P][ROWS];

  logic [IXW-1:0]      aptr;      // A logical i lives at physical i - aptr
  logic [$clog2(LOGN+1)-1:0] stage;
  logic [RW-1:0]       row;

  logic [IXW-1:0]      dcur;
  logic                ccur;
  logic [IXW-1:0]      sptr;      // pointer after this stage's delay

  always_comb begin
    dcur = '0;
    ccur = 1'b1;
    for (int n = 0; n < LOGN; n++)
      if (int'(stage) == n) begin
        dcur = IXW'(GOLAY_D[n]);
        ccur = GOLAY_C[n];
      end
    sptr = aptr + dcur;
  end

  // Physical location of A element with logical index 4*rw+p under pointer ptr.
  function automatic logic [IXW-1:0] aphys(input logic [RW-1:0] rw, input int p,
                                           input logic [IXW-1:0] ptr);
    return IXW'({rw, 2'(p)}) - ptr;
  endfunction

  // Butterfly row: read A at the delayed locations and B in place.
  logic signed [AW-1:0] a_in [P];
  logic signed [AW-1:0] b_in [P];
  logic [IXW-1:0]       a_loc [P];

  always_comb begin
    for (int p = 0; p < P; p++) begin
      a_loc[p] = aphys(row, p, sptr);
      a_in[p]  = mem_a[a_loc[p][1:0]][a_loc[p][IXW-1:2]];
      b_in[p]  = mem_b[p][row];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      aptr  <= '0;
      stage <= '0;
      row   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (wr_en) begin
          for (int p = 0; p < P; p++) begin
            mem_a[p][wr_row] <= AW'(wr_data[p]);
            mem_b[p][wr_row] <= AW'(wr_data[p]);
          end
        end
        if (start) begin
          busy  <= 1'b1;
          aptr  <= '0;
          stage <= '0;
          row   <= '0;
        end
      end else begin
        for (int p = 0; p < P; p++) begin
          logic signed [AW-1:0] cb;
          cb = ccur ? b_in[p] : -b_in[p];
          mem_a[a_loc[p][1:0]][a_loc[p][IXW-1:2]] <= a_in[p] + cb;
          mem_b[p][row]                          <= a_in[p] - cb;
        end
        row <= row + 1'b1;
        if (row == RW'(ROWS - 1)) begin
          aptr  <= sptr;
          stage <= stage + 1'b1;
          if (int'(stage) == LOGN - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic [IXW-1:0] loc;
      loc = aphys(rd_row, p, aptr);
      rd_data[p] = rd_sel ? mem_b[p][rd_row] : mem_a[loc[1:0]][loc[IXW-1:2]];
    end
  end

endmodule
