// half_pel_interp: binary half-pixel interpolator for a 16x16 block.
//
// The 22x22 integer interpolation window (block at rows/columns 3..18) is
// streamed in one 22-pixel row per cycle (in_valid, rows 0..21 in order;
// clr before the first row restarts the row count). Three arrays of 6-input
// one-output LUTs, each holding the binary six-tap filter half_tap6(), form:
//   A  horizontal half pixels. A[j] lies between integer columns j+2 and j+3
//      and uses columns j..j+5 of the current row: 17 LUTs per row.
//   B  vertical half pixels. Each integer column 2..19 feeds a 6-bit shift
//      register; B row k (between integer rows k+2 and k+3) uses rows k..k+5:
//      18 LUTs per row.
//   C  diagonal half pixels, made from A rather than from B: each of the 17 A
//      columns feeds a 6-bit shift register, C row k uses A rows k..k+5.
//
// Timing: the clock edge that takes integer row j registers A row j on a_row
// (a_valid, a_idx = j). After that same edge the combinational outputs
// b_row/c_row carry B and C row j-5 (bc_valid for j >= 5, bc_idx = j-5), so
// a full window takes 22 input cycles and yields 22 A rows and 17 B and C
// rows. The LUT arrays, the shift-register feeding of B and the derivation of
// C from A follow the published architecture; the filter held in the LUTs,
// the B width of 18 columns and the output timing are this design's choices.
module half_pel_interp
  import binme_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               in_valid,
  input  logic [IWIN-1:0]    in_row,     // bit j = integer column j
  output logic               a_valid,
  output logic [4:0]         a_idx,
  output logic [NA_COL-1:0]  a_row,      // bit j = A between columns j+2, j+3
  output logic               bc_valid,
  output logic [4:0]         bc_idx,
  output logic [NB_COL-1:0]  b_row,      // bit j = B at integer column j+2
  output logic [NA_COL-1:0]  c_row       // bit j = C between columns j+2, j+3
);

  logic [4:0]        nrows;                 // rows taken so far
  logic [NB_COL-1:0] int_sr [6];            // integer rows j-5..j, [5] newest
  logic [NA_COL-1:0] a_sr   [5];            // A rows j-5..j-1, [4] newest

  // A interpolation array on the incoming row
  logic [NA_COL-1:0] a_next;
  always_comb begin
    for (int j = 0; j < NA_COL; j++) a_next[j] = half_tap6(in_row[j +: 6]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nrows   <= '0;
      a_valid <= 1'b0;
      a_idx   <= '0;
      a_row   <= '0;
      for (int i = 0; i < 6; i++) int_sr[i] <= '0;
      for (int i = 0; i < 5; i++) a_sr[i]   <= '0;
    end else if (clr) begin
      nrows   <= '0;
      a_valid <= 1'b0;
    end else begin
      a_valid <= in_valid;
      if (in_valid) begin
        nrows <= nrows + 1'b1;
        a_idx <= nrows;
        a_row <= a_next;
        for (int i = 0; i < 5; i++) int_sr[i] <= int_sr[i+1];
        int_sr[5] <= in_row[2 +: NB_COL];
        for (int i = 0; i < 4; i++) a_sr[i] <= a_sr[i+1];
        a_sr[4] <= a_row;
      end
    end
  end

  // B and C interpolation arrays on the shift-register taps
  always_comb begin
    logic [5:0] tap;
    for (int j = 0; j < NB_COL; j++) begin
      for (int i = 0; i < 6; i++) tap[i] = int_sr[i][j];
      b_row[j] = half_tap6(tap);
    end
    for (int j = 0; j < NA_COL; j++) begin
      for (int i = 0; i < 5; i++) tap[i] = a_sr[i][j];
      tap[5] = a_row[j];
      c_row[j] = half_tap6(tap);
    end
  end

  assign bc_valid = a_valid && (a_idx >= 5'd5);
  assign bc_idx   = a_idx - 5'd5;

endmodule
