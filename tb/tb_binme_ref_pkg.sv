// tb_binme_ref_pkg: reference model used by the testbenches.
//
// It recomputes everything from plain pixel arrays, without the RTL's row
// pipelines: the binary six-tap half-pixel filter written as the rounded and
// clipped H.264 average, half pixels addressed on a half-pel grid of the
// 22x22 window, the quarter-pixel operands looked up by name in the
// quarter-pixel strategy table (location SL0..SL7 against the nine half-pixel
// results), NNMPs, and the winner selection (centre wins ties, then the lower
// location number).
package tb_binme_ref_pkg;

  typedef bit win_t [22][22];   // [row][col] integer window
  typedef bit blk_t [16][16];   // [row][col] reference block

  // Rounded six-tap average of one-bit samples, clipped to 0..1.
  function automatic bit ref_tap6(input bit e, f, g, h, i, j);
    int w [6] = '{1, -5, 20, 20, -5, 1};
    int p [6];
    int s, v;
    p = '{int'(e), int'(f), int'(g), int'(h), int'(i), int'(j)};
    s = 0;
    foreach (w[k]) s += w[k] * p[k];
    v = (s + 16) >>> 5;
    if (v < 0) v = 0;
    if (v > 1) v = 1;
    return bit'(v);
  endfunction

  // A half pixel between columns c0, c0+1 of row r.
  function automatic bit ref_a(input win_t w, input int r, input int c0);
    return ref_tap6(w[r][c0-2], w[r][c0-1], w[r][c0], w[r][c0+1], w[r][c0+2], w[r][c0+3]);
  endfunction

  // Sample of the half-pel grid of the window: integer pixel (r,c) is at
  // (2r, 2c). Odd/odd (C) positions filter A pixels vertically.
  function automatic bit ref_grid(input win_t w, input int r2, input int c2);
    int r0, c0;
    r0 = r2 >>> 1;
    c0 = c2 >>> 1;
    if (r2 % 2 == 0 && c2 % 2 == 0) return w[r0][c0];
    if (r2 % 2 == 0)                return ref_a(w, r0, c0);
    if (c2 % 2 == 0)
      return ref_tap6(w[r0-2][c0], w[r0-1][c0], w[r0][c0], w[r0+1][c0], w[r0+2][c0], w[r0+3][c0]);
    return ref_tap6(ref_a(w, r0-2, c0), ref_a(w, r0-1, c0), ref_a(w, r0, c0),
                    ref_a(w, r0+1, c0), ref_a(w, r0+2, c0), ref_a(w, r0+3, c0));
  endfunction

  // Offsets of SL0..SL7 (x right, y up).
  function automatic void ref_sl(input int sl, output int x, output int y);
    int xs [8] = '{-1, 1, 0, 0, -1, 1, -1, 1};
    int ys [8] = '{ 0, 0, 1, -1, 1, 1, -1, -1};
    x = xs[sl];
    y = ys[sl];
  endfunction

  // NNMP of the half-pixel candidate (hx, hy) (x right, y up).
  function automatic int ref_hp_nnmp(input win_t w, input blk_t rb, input int hx, input int hy);
    int n = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (rb[i][j] != ref_grid(w, 2*(3+i) - hy, 2*(3+j) + hx)) n++;
    return n;
  endfunction

  // Quarter-pixel strategy table: operands of SL0..SL7 for the half-pixel
  // results (-1,-1) (0,-1) (1,-1) (-1,0) (0,0) (1,0) (-1,1) (0,1) (1,1).
  // Names follow the quarter-pixel window: iXY integer, aXY horizontal half,
  // bXY vertical half, cXY diagonal half pixel; X, Y index rows and columns
  // around integer pixel i11.
  localparam string QTAB [8][9] = '{
    '{"b10c10","b11c10","b11c11","i10a10","i11a10","i11a11","b00c00","b01c00","b01c01"},
    '{"b11c10","b11c11","b12c11","i11a10","i11a11","i12a11","b01c00","b01c01","b02c01"},
    '{"a10c10","i11b11","a11c11","a10c00","i11b01","a11c01","a00c00","i01b01","a01c01"},
    '{"a20c10","i21b11","a21c11","a10c10","i11b11","a11c11","a10c00","i11b01","a11c01"},
    '{"a10b10","a10b11","a11b11","a10b00","a10b01","a11b01","a00b00","a00b01","a01b01"},
    '{"a10b11","a11b11","a11b12","a10b01","a11b01","a11b02","a00b01","a01b01","a01b02"},
    '{"a20b10","a20b11","a21b11","a10b10","a10b11","a11b11","a10b00","a10b01","a11b01"},
    '{"a20b11","a21b11","a21b12","a10b11","a11b11","a11b12","a10b01","a11b01","a11b02"}
  };

  // Half-pel grid offset (rows down) of a named sample relative to i11.
  function automatic void ref_name_pos(input string nm, output int dr2, output int dc2);
    int x, y;
    x = int'(nm[1]) - 48;
    y = int'(nm[2]) - 48;
    case (nm[0])
      "i": begin dr2 = 2*(x-1); dc2 = 2*(y-1); end
      "a": begin dr2 = 2*(x-1); dc2 = 2*y - 1; end
      "b": begin dr2 = 2*x - 1; dc2 = 2*(y-1); end
      default: begin dr2 = 2*x - 1; dc2 = 2*y - 1; end
    endcase
  endfunction

  // Quarter pixel of location sl for block pixel (i, j) given the half-pixel
  // result (hx, hy).
  function automatic bit ref_qp_pixel(input win_t w, input int hx, input int hy,
                                      input int sl, input int i, input int j);
    string e;
    int d0r, d0c, d1r, d1c;
    e = QTAB[sl][(hy+1)*3 + (hx+1)];
    ref_name_pos(e.substr(0, 2), d0r, d0c);
    ref_name_pos(e.substr(3, 5), d1r, d1c);
    return ref_grid(w, 2*(3+i) + d0r, 2*(3+j) + d0c) |
           ref_grid(w, 2*(3+i) + d1r, 2*(3+j) + d1c);
  endfunction

  function automatic int ref_qp_nnmp(input win_t w, input blk_t rb, input int hx, input int hy,
                                     input int sl);
    int n = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (rb[i][j] != ref_qp_pixel(w, hx, hy, sl, i, j)) n++;
    return n;
  endfunction

  // Winner among centre and eight locations: returns 8 for the centre.
  function automatic int ref_pick(input int centre, input int n [8]);
    int best, bi;
    best = centre;
    bi = 8;
    for (int k = 0; k < 8; k++) if (n[k] < best) begin best = n[k]; bi = k; end
    return bi;
  endfunction

  // Full sub-pixel search: half-pixel then quarter-pixel winner.
  function automatic void ref_subpel(input win_t w, input blk_t rb, input int centre,
                                     output int hx, output int hy, output int hn,
                                     output int qx, output int qy, output int qn);
    int n [8];
    int bi, x, y;
    for (int k = 0; k < 8; k++) begin
      ref_sl(k, x, y);
      n[k] = ref_hp_nnmp(w, rb, x, y);
    end
    bi = ref_pick(centre, n);
    if (bi == 8) begin hx = 0; hy = 0; hn = centre; end
    else begin ref_sl(bi, hx, hy); hn = n[bi]; end
    for (int k = 0; k < 8; k++) n[k] = ref_qp_nnmp(w, rb, hx, hy, k);
    bi = ref_pick(hn, n);
    if (bi == 8) begin qx = 0; qy = 0; qn = hn; end
    else begin ref_sl(bi, qx, qy); qn = n[bi]; end
  endfunction

endpackage
