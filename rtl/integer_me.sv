// integer_me: full-search binary (one bit per pixel) integer motion estimation
// of a 16x16 block over a [-RANGE, RANGE-1] search range, built as a
// source-pixel-based linear array (SPBLA) of 16 PEs, a data-flow controller
// and a running-minimum comparator.
//
// Data flow: the search window has W = 2*RANGE+15 rows of W pixels. Candidate
// columns x = 0..2*RANGE-1 are processed one after the other, one every
// P = 2*RANGE cycles; column x streams its W window rows (each a 16-pixel
// slice starting at pixel x) on bus s1 when x is even and on bus s2 when x is
// odd, in cycles P*x .. P*x+W-1, so the tail of one column overlaps the head
// of the next. The reference row t mod 16 is on the r bus in cycle t; PE k
// latches reference row k and, in cycle t, compares it against the search row
// of column (t-k) div P. The partial NNMP ripples through the chain, so the
// sum leaving PE 15 in cycle t is the NNMP of candidate
// n = t-15 (x = n div P, vertical position v = n mod P). The comparator keeps
// the first strict minimum in that order.
//
// Timing: start is sampled on a clock edge; the candidate sums appear in
// cycles 15 .. P*P+14 and done pulses together with the final motion vector
// P*P+15 edges after the start edge (1039 for RANGE = 16).
//
// Interface: the window memory is outside. s1_row_addr/s1_col address bus s1
// (row of the window, first pixel of the 16-pixel slice), likewise s2; the
// slices come back combinationally on s1_data/s2_data. ref_addr/ref_data read
// the reference block in the same way. Bit j of a slice is pixel column
// col+j. mv_x, mv_y are in pixels, y positive downwards; min_nnmp is the NNMP
// of the winner. The array, the two buses and the schedule follow the
// published data-flow table; the memory interface, the tie rule and the
// handshake are choices of this design.
module integer_me
  import binme_pkg::*;
#(
  parameter int unsigned RANGE = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [$clog2(2*RANGE+15)-1:0] s1_row_addr,
  output logic [$clog2(2*RANGE)-1:0]    s1_col,
  input  logic [15:0] s1_data,
  output logic [$clog2(2*RANGE+15)-1:0] s2_row_addr,
  output logic [$clog2(2*RANGE)-1:0]    s2_col,
  input  logic [15:0] s2_data,
  output logic [3:0]  ref_addr,
  input  logic [15:0] ref_data,
  output logic signed [$clog2(2*RANGE):0] mv_x,
  output logic signed [$clog2(2*RANGE):0] mv_y,
  output nnmp_t       min_nnmp
);

  localparam int unsigned P     = 2 * RANGE;          // candidates per dimension
  localparam int unsigned W     = P + BLK - 1;        // window rows / columns
  localparam int unsigned LAST  = P * P + BLK - 2;    // last cycle index (1038)
  localparam int unsigned TW    = $clog2(LAST + 1);
  localparam int unsigned RW    = $clog2(W);
  localparam int unsigned CW    = $clog2(P);
  localparam int unsigned PW    = $clog2(P);

  logic [TW-1:0] t;
  logic [TW-1:0] x_hi;        // newest column whose rows are streaming
  logic [PW-1:0] t_in_col;    // t mod P
  logic          new_on_s2;   // newest column is odd -> on bus s2

  assign x_hi      = t / TW'(P);
  assign t_in_col  = PW'(t % TW'(P));
  assign new_on_s2 = x_hi[0];

  // Row addresses and column offsets of the two search buses.
  logic [RW-1:0] new_row, old_row;
  logic [CW-1:0] new_col, old_col;
  always_comb begin
    new_row = RW'(t_in_col);
    new_col = (x_hi >= TW'(P)) ? CW'(P - 1) : CW'(x_hi);
    // tail rows P..W-1 of the previous column
    old_row = (t_in_col < PW'(BLK - 1)) ? RW'(t_in_col) + RW'(P) : RW'(W - 1);
    old_col = (x_hi == '0) ? '0 : CW'(x_hi - 1'b1);
    if (new_on_s2) begin
      s2_row_addr = new_row; s2_col = new_col;
      s1_row_addr = old_row; s1_col = old_col;
    end else begin
      s1_row_addr = new_row; s1_col = new_col;
      s2_row_addr = old_row; s2_col = old_col;
    end
  end

  assign ref_addr = t[3:0];

  // PE array
  nnmp_t chain [BLK+1];
  nnmp_t pe_sum [BLK];
  assign chain[0] = '0;

  for (genvar k = 0; k < BLK; k++) begin : g_pe
    logic [TW-1:0] tk;
    logic          sel2;
    assign tk   = t - TW'(k);                // wraps for t < k: PE idle, result unused
    assign sel2 = (tk / TW'(P)) % 2 == 1;
    spbla_pe u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .r_load (busy && (t[3:0] == 4'(k))),
      .r_in   (ref_data),
      .s1     (s1_data),
      .s2     (s2_data),
      .sel_s2 (sel2),
      .acc_in (chain[k]),
      .sum    (pe_sum[k]),
      .acc_out(chain[k+1])
    );
  end

  // Controller and running-minimum comparator (fed by the sum S of PE 15).
  nnmp_t         best;
  logic [TW-1:0] best_n;
  logic          first;
  logic          better;
  assign first  = (t == TW'(BLK - 1));
  assign better = first || (pe_sum[BLK-1] < best);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t      <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      best   <= '0;
      best_n <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= '0;
        end
      end else begin
        if (t >= TW'(BLK - 1) && better) begin
          best   <= pe_sum[BLK-1];
          best_n <= t - TW'(BLK - 1);
        end
        if (t == TW'(LAST)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

  assign mv_x     = $signed({1'b0, CW'(best_n / TW'(P))}) - $signed((CW+1)'(RANGE));
  assign mv_y     = $signed({1'b0, CW'(best_n % TW'(P))}) - $signed((CW+1)'(RANGE));
  assign min_nnmp = best;

  // done is a single-cycle pulse issued when the search has ended.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy ##1 !done);

endmodule
