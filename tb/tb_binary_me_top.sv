// tb_binary_me_top: end-to-end, full-size testbench of the quarter-pixel
// binary motion estimator (16x16 blocks, search range [-16,15]).
//
// Each block gets a random 53x53 binary search area (or keeps the previous
// one) and a reference block cut from the half-, quarter- or integer-pixel
// plane around a random integer position, with a few pixels flipped. The
// testbench predicts the integer vector by exhaustive search and the half-
// and quarter-pixel vectors with the reference model on the 22x22 window
// around the predicted integer winner, and checks every result field and the
// combined quarter-pixel vector. Timing checks: int_valid 1039 edges and
// res_valid 1113 edges after the start edge (1039 integer search, 2 hand-over,
// 22 window copy, 1 start, 49 sub-pixel search), and ready rising again
// 1063 edges after it.
//
// Blocks that keep the search area are started as soon as ready rises, so
// the next integer search overlaps the sub-pixel search of the previous
// block. The testbench counts, and requires at least once each: a half-pixel
// winner off the centre, a quarter-pixel winner off the centre, a block whose
// integer position stays best, and an overlapped (pipelined) block.
module tb_binary_me_top;
  import binme_pkg::*;
  import tb_binme_ref_pkg::*;

  localparam int NBLK = 12;
  localparam int SA = 53;

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
  int n_hp_moved = 0, n_qp_moved = 0, n_centre = 0, n_overlap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NBLK * 1500 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit area [SA][SA];
  blk_t rb;

  // expected results, one entry per started block
  typedef struct {
    int ix, iy, in_;
    int hx, hy, qx, qy, qn;
    int start_edge;
  } exp_t;
  exp_t q_int [$];
  exp_t q_res [$];

  int edge_no = 0;
  bit int_running = 1'b0;
  always @(posedge clk) edge_no++;

  // result monitor
  int last_start_edge = 0;
  bit ready_q = 1'b1;
  always @(posedge clk) begin
    #1;
    if (ready && !ready_q)
      check(edge_no - last_start_edge == 1063,
            $sformatf("ready rose %0d edges after start, expected 1063", edge_no - last_start_edge));
    ready_q = ready;
    if (int_valid) begin
      exp_t e;
      e = q_int.pop_front();
      int_running = 1'b0;
      check(int'(int_mv_x) == e.ix && int'(int_mv_y) == e.iy && int'(int_nnmp) == e.in_,
            $sformatf("integer result (%0d,%0d) %0d expected (%0d,%0d) %0d",
                      int_mv_x, int_mv_y, int_nnmp, e.ix, e.iy, e.in_));
      check(edge_no - e.start_edge == 1039,
            $sformatf("int_valid %0d edges after start, expected 1039", edge_no - e.start_edge));
    end
    if (res_valid) begin
      exp_t e;
      e = q_res.pop_front();
      if (int_running) n_overlap++;
      check(int'(res_int_x) == e.ix && int'(res_int_y) == e.iy,
            $sformatf("res integer (%0d,%0d) expected (%0d,%0d)", res_int_x, res_int_y, e.ix, e.iy));
      check(int'(res_hp.x) == e.hx && int'(res_hp.y) == e.hy,
            $sformatf("res hp (%0d,%0d) expected (%0d,%0d)", res_hp.x, res_hp.y, e.hx, e.hy));
      check(int'(res_qp.x) == e.qx && int'(res_qp.y) == e.qy,
            $sformatf("res qp (%0d,%0d) expected (%0d,%0d)", res_qp.x, res_qp.y, e.qx, e.qy));
      check(int'(res_nnmp) == e.qn, $sformatf("res nnmp %0d expected %0d", res_nnmp, e.qn));
      check(int'(qmv_x) == 4*e.ix + 2*e.hx + e.qx && int'(qmv_y) == 4*e.iy - 2*e.hy - e.qy,
            $sformatf("qmv (%0d,%0d) expected (%0d,%0d)", qmv_x, qmv_y,
                      4*e.ix + 2*e.hx + e.qx, 4*e.iy - 2*e.hy - e.qy));
      check(edge_no - e.start_edge == 1113,
            $sformatf("res_valid %0d edges after start, expected 1113", edge_no - e.start_edge));
      if (e.hx != 0 || e.hy != 0) n_hp_moved++; else n_centre++;
      if (e.qx != 0 || e.qy != 0) n_qp_moved++;
    end
  end

  initial begin
    win_t w;
    exp_t e;
    int vx, vy, mode, px, py, sl, best, d;
    bit new_area;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      new_area = (b % 2 == 0);
      if (new_area)
        for (int r = 0; r < SA; r++)
          for (int c = 0; c < SA; c++) area[r][c] = bit'($urandom_range(0, 1));
      // reference from the plane around a chosen integer position
      vx = $urandom_range(0, 31) - 16;
      vy = $urandom_range(0, 31) - 16;
      for (int r = 0; r < 22; r++)
        for (int c = 0; c < 22; c++) w[r][c] = area[16+vy+r][16+vx+c];
      mode = (b % 4 == 0) ? 0 : (b % 2 == 1) ? 2 : 1;
      sl = $urandom_range(0, 7);
      ref_sl($urandom_range(0, 7), px, py);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          case (mode)
            0: rb[i][j] = w[3+i][3+j];
            1: rb[i][j] = ref_grid(w, 2*(3+i) - py, 2*(3+j) + px);
            default: rb[i][j] = ref_qp_pixel(w, px, py, sl, i, j);
          endcase
      repeat ($urandom_range(0, 6)) begin
        int fr, fc;
        fr = $urandom_range(0, 15);
        fc = $urandom_range(0, 15);
        rb[fr][fc] = ~rb[fr][fc];
      end

      // expected integer result: first minimum, columns outer, rows inner
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

      // load and start as soon as the integer stage is free
      while (!ready) @(posedge clk);
      if (new_area)
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
      last_start_edge = edge_no;
      int_running = 1'b1;
      q_int.push_back(e);
      q_res.push_back(e);
    end
    while (q_res.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);

    $display("half-pixel moves %0d, centre kept %0d, quarter-pixel moves %0d, overlapped blocks %0d",
             n_hp_moved, n_centre, n_qp_moved, n_overlap);
    check(n_hp_moved > 0, "no half-pixel winner off the centre");
    check(n_centre > 0, "no block kept its integer position");
    check(n_qp_moved > 0, "no quarter-pixel winner off the centre");
    check(n_overlap > 0, "no sub-pixel search overlapped the next integer search");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
