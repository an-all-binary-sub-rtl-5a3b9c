// quarter_pel_interp: the eight binary quarter-pixel datapaths (SL0..SL7) for
// one row of a 16x16 block.
//
// A binary quarter pixel is the OR of its two nearest integer or half
// pixels: the rounded average (p+q+1)>>1 of two one-bit values is p|q. Around
// the half-pixel winner hp the eight search locations are
//   SL4 SL2 SL5
//   SL0 hp  SL1
//   SL6 SL3 SL7
// Horizontal neighbours (SL0, SL1) OR two samples of the same row, vertical
// ones (SL2, SL3) two samples of the same column, and the diagonal ones the
// nearest A (horizontal half) and B (vertical half) pixel. Which stores the
// two operands come from therefore depends on the half-pixel vector: e.g. for
// SL3 it is an integer and a B pixel when hp.x = 0 and an A and a C pixel
// otherwise, with the A/C column chosen by the sign of hp.x. Each datapath is
// a column select, an operand multiplexer and a 16-bit OR array; this module
// describes the selection once, by the half-pel grid position of each
// operand, and the per-location constants fold it into that structure.
//
// Inputs, for block row r (integer row r+3 of the 22x22 window):
//   i_rows[0..2]  integer rows r+2..r+4, columns 2..19 (bit 0 = column 2)
//   a_rows[0..2]  A rows of integer rows r+2..r+4 (17 bits)
//   b_rows[0..1]  B rows r, r+1 (above and below the block row, 18 bits)
//   c_rows[0..1]  C rows r, r+1 (17 bits)
// hp is the half-pixel vector (x right, y up, each -1..1). qp_rows[sl] bit c is
// the quarter pixel of location SL<sl> for block column c. Combinational.
// The operand choice reproduces the published quarter-pixel strategy table.
module quarter_pel_interp
  import binme_pkg::*;
(
  input  subvec_t           hp,
  input  logic [NB_COL-1:0] i_rows [3],
  input  logic [NA_COL-1:0] a_rows [3],
  input  logic [NB_COL-1:0] b_rows [2],
  input  logic [NA_COL-1:0] c_rows [2],
  output logic [15:0]       qp_rows [8]
);

  // Sample of the half-pel grid at (pr, pc) half pixels from block pixel
  // (r, c), pr downwards, pr, pc in -2..2.
  function automatic logic grid(input int pr, input int pc, input int c,
                                input logic [NB_COL-1:0] ir [3],
                                input logic [NA_COL-1:0] ar [3],
                                input logic [NB_COL-1:0] br [2],
                                input logic [NA_COL-1:0] cr [2]);
    int ri, ci;
    bit row_half, col_half;
    row_half = (pr % 2) != 0;
    col_half = (pc % 2) != 0;
    ri = row_half ? (pr + 1) / 2 : pr / 2 + 1;
    ci = col_half ? c + (pc + 1) / 2 : c + 1 + pc / 2;
    case ({row_half, col_half})
      2'b00:   return ir[ri][ci];
      2'b01:   return ar[ri][ci];
      2'b10:   return br[ri][ci];
      default: return cr[ri][ci];
    endcase
  endfunction

  always_comb begin
    for (int sl = 0; sl < 8; sl++) begin
      subvec_t d;
      int tr, tc, pr0, pr1, pc0, pc1;
      d  = sl_offset(sl);
      // target in quarter pixels, rows downwards
      tr = -2 * int'(hp.y) - int'(d.y);
      tc =  2 * int'(hp.x) + int'(d.x);
      if (tr % 2 == 0) begin            // same row: left and right neighbour
        pr0 = tr / 2;        pr1 = tr / 2;
        pc0 = (tc - 1) / 2;  pc1 = (tc + 1) / 2;
      end else if (tc % 2 == 0) begin   // same column: upper and lower neighbour
        pr0 = (tr - 1) / 2;  pr1 = (tr + 1) / 2;
        pc0 = tc / 2;        pc1 = tc / 2;
      end else begin                    // diagonal: nearest A and nearest B
        // A: integer row (even pr), half column (odd pc); B: the opposite.
        pr0 = ((tr - 1) / 2) % 2 == 0 ? (tr - 1) / 2 : (tr + 1) / 2;
        pc0 = ((tc - 1) / 2) % 2 != 0 ? (tc - 1) / 2 : (tc + 1) / 2;
        pr1 = ((tr - 1) / 2) % 2 != 0 ? (tr - 1) / 2 : (tr + 1) / 2;
        pc1 = ((tc - 1) / 2) % 2 == 0 ? (tc - 1) / 2 : (tc + 1) / 2;
      end
      for (int c = 0; c < 16; c++) begin
        qp_rows[sl][c] = grid(pr0, pc0, c, i_rows, a_rows, b_rows, c_rows)
                       | grid(pr1, pc1, c, i_rows, a_rows, b_rows, c_rows);
      end
    end
  end

endmodule
