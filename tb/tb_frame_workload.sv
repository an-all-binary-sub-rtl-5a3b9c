// tb_frame_workload: one whole 352x288 frame (396 blocks of 16x16) through the
// full-size quarter-pixel binary motion estimator, as a video encoder would
// run it.
//
// The testbench builds a one-bit previous frame, a smoothed random pattern
// made by thresholding a sum of random rectangles. It then builds the current
// frame block by block from three motion regions:
//   * the top third moves by an integer vector;
//   * the middle third by an integer vector plus a half pixel;
//   * the bottom third by an integer vector plus a quarter pixel.
// The half- and quarter-pixel samples are made with the reference model's
// interpolation. A few pixels per block are flipped as noise.
//
// For every block in raster order, the testbench acts as the host:
//   1. it writes the 53x53 search area around the block, with coordinates
//      outside the frame clamped to the nearest frame pixel;
//   2. it writes the 16x16 current block;
//   3. it pulses start as soon as ready is high.
//
// Every result is compared with an exhaustive integer search on the same
// search area, followed by the reference sub-pixel search on the 22x22
// window around its winner. Checks per block: int_valid 1039 edges and
// res_valid 1113 edges after the start edge, and one block every 1133 cycles
// (1063 busy plus 53 + 16 load cycles plus the start cycle). The frame must
// finish within 396 x 1133 + 50 cycles.
//
// For information only, the testbench prints how many blocks found the
// motion that was planted. Binary matching can prefer another vector, so this
// count is not checked. What it does require is at least one half-pixel move,
// one quarter-pixel move, and one block whose search area was clamped at the
// frame border.
//
// The frame size is 352x288, a size of the published test sequences. The
// 352x240 sequences differ only in FH.
module tb_frame_workload;
  import binme_pkg::*;
  import tb_binme_ref_pkg::*;

  localparam int FW = 352;
  localparam int FH = 288;
  localparam int BX = FW / 16;
  localparam int BY = FH / 16;
  localparam int NBLK = BX * BY;
  localparam int SA = 53;
  localparam int PERIOD = 1063 + SA + 16 + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              sa_we = 1'b0;
  logic [5:0]        sa_addr = '0;
  logic [SA-1:0]     sa_data = '0;
  logic              rb_we = 1'b0;
  logic [3:0]        rb_addr = '0;
  logic [15:0]       rb_data = '0;
  logic              start = 1'b0;
  logic              ready, int_valid, res_valid;
  logic signed [5:0] int_mv_x, int_mv_y, res_int_x, res_int_y;
  nnmp_t             int_nnmp, res_nnmp;
  subvec_t           res_hp, res_qp;
  logic signed [8:0] qmv_x, qmv_y;

  binary_me_top dut (.*);

  int checks = 0;
  int failures = 0;
  int n_hp_moved = 0, n_qp_moved = 0, n_clamped = 0, n_true = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NBLK * PERIOD + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit prev [FH][FW];
  bit area [SA][SA];

  function automatic bit pix(input int r, input int c);
    int rr, cc;
    rr = r < 0 ? 0 : (r >= FH ? FH - 1 : r);
    cc = c < 0 ? 0 : (c >= FW ? FW - 1 : c);
    return prev[rr][cc];
  endfunction

  typedef struct {
    int ix, iy, in_;
    int hx, hy, qx, qy, qn;
    int start_edge;
  } exp_t;
  exp_t q_int [$];
  exp_t q_res [$];

  int edge_no = 0;
  always @(posedge clk) edge_no++;

  always @(posedge clk) begin
    #1;
    if (int_valid) begin
      exp_t e;
      e = q_int.pop_front();
      check(int'(int_mv_x) == e.ix && int'(int_mv_y) == e.iy && int'(int_nnmp) == e.in_,
            $sformatf("integer result (%0d,%0d) %0d expected (%0d,%0d) %0d",
                      int_mv_x, int_mv_y, int_nnmp, e.ix, e.iy, e.in_));
      check(edge_no - e.start_edge == 1039,
            $sformatf("int_valid %0d edges after start, expected 1039", edge_no - e.start_edge));
    end
    if (res_valid) begin
      exp_t e;
      e = q_res.pop_front();
      check(int'(res_hp) == int'({2'(e.hx), 2'(e.hy)}) && int'(res_qp) == int'({2'(e.qx), 2'(e.qy)})
            && int'(res_nnmp) == e.qn
            && int'(qmv_x) == 4*e.ix + 2*e.hx + e.qx && int'(qmv_y) == 4*e.iy - 2*e.hy - e.qy,
            $sformatf("result qmv (%0d,%0d) nnmp %0d expected (%0d,%0d) nnmp %0d", qmv_x, qmv_y, res_nnmp,
                      4*e.ix + 2*e.hx + e.qx, 4*e.iy - 2*e.hy - e.qy, e.qn));
      check(edge_no - e.start_edge == 1113,
            $sformatf("res_valid %0d edges after start, expected 1113", edge_no - e.start_edge));
      if (e.hx != 0 || e.hy != 0) n_hp_moved++;
      if (e.qx != 0 || e.qy != 0) n_qp_moved++;
    end
  end

  initial begin
    win_t w;
    blk_t rb;
    exp_t e;
    int best, d, first_start, prev_start, region, tx, ty, tpx, tpy, tsl, pr, pc;
    int acc [FH][FW];

    // previous frame: thresholded sum of random rectangles
    for (int k = 0; k < 1500; k++) begin
      int r0, c0, h, wd, v;
      r0 = $urandom_range(0, FH - 1);
      c0 = $urandom_range(0, FW - 1);
      h  = $urandom_range(2, 12);
      wd = $urandom_range(2, 12);
      v  = $urandom_range(0, 1) == 1 ? 1 : -1;
      for (int r = r0; r < r0 + h && r < FH; r++)
        for (int c = c0; c < c0 + wd && c < FW; c++) acc[r][c] += v;
    end
    for (int r = 0; r < FH; r++)
      for (int c = 0; c < FW; c++) prev[r][c] = acc[r][c] > 0;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    first_start = -1;
    prev_start = -1;

    for (int b = 0; b < NBLK; b++) begin
      pr = (b / BX) * 16;
      pc = (b % BX) * 16;
      // planted motion of this region
      region = (pr * 3) / FH;
      tx = region == 0 ? 5 : (region == 1 ? -3 : 2);
      ty = region == 0 ? -2 : (region == 1 ? 4 : -6);
      ref_sl((b * 5) % 8, tpx, tpy);
      tsl = (b * 3) % 8;
      for (int r = 0; r < 22; r++)
        for (int c = 0; c < 22; c++) w[r][c] = pix(pr + ty - 3 + r, pc + tx - 3 + c);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          case (region)
            0: rb[i][j] = w[3+i][3+j];
            1: rb[i][j] = ref_grid(w, 2*(3+i) - tpy, 2*(3+j) + tpx);
            default: rb[i][j] = ref_qp_pixel(w, tpx, tpy, tsl, i, j);
          endcase
      repeat ($urandom_range(0, 4)) begin
        int fr, fc;
        fr = $urandom_range(0, 15);
        fc = $urandom_range(0, 15);
        rb[fr][fc] = ~rb[fr][fc];
      end

      // search area, clamped at the frame border
      for (int r = 0; r < SA; r++)
        for (int c = 0; c < SA; c++) area[r][c] = pix(pr - 19 + r, pc - 19 + c);
      if (pr < 19 || pc < 19 || pr + 16 + 18 > FH || pc + 16 + 18 > FW) n_clamped++;

      // expected results
      best = 1000;
      for (int x = 0; x < 32; x++)
        for (int v = 0; v < 32; v++) begin
          d = 0;
          for (int i = 0; i < 16; i++)
            for (int j = 0; j < 16; j++) if (rb[i][j] != area[3+v+i][3+x+j]) d++;
          if (d < best) begin best = d; e.ix = x - 16; e.iy = v - 16; end
        end
      e.in_ = best;
      for (int r = 0; r < 22; r++)
        for (int c = 0; c < 22; c++) w[r][c] = area[16+e.iy+r][16+e.ix+c];
      ref_subpel(w, rb, best, e.hx, e.hy, d, e.qx, e.qy, e.qn);
      if (e.ix == tx && e.iy == ty &&
          (region == 0 ? (e.hx == 0 && e.hy == 0) : (e.hx == tpx && e.hy == tpy)))
        n_true++;

      // host: load and start
      while (!ready) begin
        @(posedge clk);
        #1;
      end
      for (int r = 0; r < SA; r++) begin
        sa_we <= 1'b1; sa_addr <= 6'(r);
        for (int c = 0; c < SA; c++) sa_data[c] <= area[r][c];
        @(posedge clk);
      end
      sa_we <= 1'b0;
      for (int r = 0; r < 16; r++) begin
        rb_we <= 1'b1; rb_addr <= 4'(r);
        for (int c = 0; c < 16; c++) rb_data[c] <= rb[r][c];
        @(posedge clk);
      end
      rb_we <= 1'b0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      e.start_edge = edge_no;
      if (first_start < 0) first_start = edge_no;
      if (prev_start >= 0)
        check(edge_no - prev_start == PERIOD,
              $sformatf("block %0d started %0d edges after the previous one, expected %0d",
                        b, edge_no - prev_start, PERIOD));
      prev_start = edge_no;
      q_int.push_back(e);
      q_res.push_back(e);
    end
    while (q_res.size() != 0) @(posedge clk);

    $display("frame %0dx%0d: %0d blocks in %0d cycles (%0d per block), planted motion found in %0d blocks",
             FW, FH, NBLK, edge_no - first_start, (edge_no - first_start) / NBLK, n_true);
    $display("half-pixel moves %0d, quarter-pixel moves %0d, border-clamped search areas %0d",
             n_hp_moved, n_qp_moved, n_clamped);
    check(edge_no - first_start <= NBLK * PERIOD + 50,
          $sformatf("frame took %0d cycles, more than %0d", edge_no - first_start, NBLK * PERIOD + 50));
    check(n_hp_moved > 0, "no half-pixel move in the frame");
    check(n_qp_moved > 0, "no quarter-pixel move in the frame");
    check(n_clamped > 0, "no block at the frame border");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
