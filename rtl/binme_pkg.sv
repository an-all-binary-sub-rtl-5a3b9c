// binme_pkg: types, sizes and pure functions shared by the binary (one bit per
// pixel) motion estimation engines.
//
// Sizes follow the design: 16x16 blocks, an integer search range of [-16,15]
// (47x47 integer search window), a 22x22 integer interpolation window for the
// sub-pixel stage and 9-bit NNMP (number of non-matching points) sums.
//
// half_tap6() is the binary half-pixel filter held in every 6-input LUT of the
// half-pixel interpolator. It applies the H.264 six-tap filter
// (1,-5,20,20,-5,1) to one-bit samples, rounds ((sum+16)>>5) and clips the
// result to one bit, which reduces to "sum >= 16". The exact binary rule is a
// choice of this design. popcount8() is the 256x4 mismatch-count LUT of a PE.
package binme_pkg;

  localparam int unsigned BLK      = 16;            // block size (pixels)
  localparam int unsigned NNMP_W   = 9;             // 0..256 mismatches
  localparam int unsigned IWIN     = BLK + 6;       // 22: integer interpolation window
  localparam int unsigned NA_COL   = BLK + 1;       // 17 A/C half pixels per row
  localparam int unsigned NB_COL   = BLK + 2;       // 18 B half pixels per row
  localparam int unsigned NA_ROW   = BLK + 2;       // 18 stored A rows
  localparam int unsigned NC_ROW   = BLK + 1;       // 17 stored B/C rows

  typedef logic [NNMP_W-1:0] nnmp_t;

  // Sub-pixel displacement in the published convention: x positive to the right,
  // y positive upwards, each component in {-1,0,+1} (half or quarter pel).
  typedef struct packed {
    logic signed [1:0] x;
    logic signed [1:0] y;
  } subvec_t;

  // Offsets of the eight search locations SL0..SL7 around a centre
  //   SL4 SL2 SL5
  //   SL0  c  SL1
  //   SL6 SL3 SL7
  // The same order is used for the eight half-pixel search locations.
  function automatic subvec_t sl_offset(input int unsigned sl);
    subvec_t v;
    case (sl)
      0: begin v.x = -2'sd1; v.y =  2'sd0; end
      1: begin v.x =  2'sd1; v.y =  2'sd0; end
      2: begin v.x =  2'sd0; v.y =  2'sd1; end
      3: begin v.x =  2'sd0; v.y = -2'sd1; end
      4: begin v.x = -2'sd1; v.y =  2'sd1; end
      5: begin v.x =  2'sd1; v.y =  2'sd1; end
      6: begin v.x = -2'sd1; v.y = -2'sd1; end
      default: begin v.x = 2'sd1; v.y = -2'sd1; end
    endcase
    return v;
  endfunction

  // Binary six-tap half-pixel filter; p[0] is the first tap (E), p[5] the last (J).
  function automatic logic half_tap6(input logic [5:0] p);
    int s;
    s = int'(p[0]) - 5*int'(p[1]) + 20*int'(p[2]) + 20*int'(p[3])
        - 5*int'(p[4]) + int'(p[5]);
    return (s >= 16);
  endfunction

  // Number of ones in a byte (the 256 x 4 LUT of a processing element).
  function automatic logic [3:0] popcount8(input logic [7:0] v);
    logic [3:0] c;
    c = '0;
    for (int i = 0; i < 8; i++) c += {3'b000, v[i]};
    return c;
  endfunction

  // Mismatch count of two 16-pixel rows: two XOR arrays, two LUTs, one adder.
  function automatic logic [4:0] row_mismatch(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] d;
    d = a ^ b;
    return {1'b0, popcount8(d[7:0])} + {1'b0, popcount8(d[15:8])};
  endfunction

endpackage
