// tb_subpel_me: self-checking testbench of the sub-pixel motion estimation
// engine.
//
// Each trial writes a random 22x22 binary window and a 16x16 reference block
// made from one of the window's half- or quarter-pixel planes (chosen at
// random, then a few pixels flipped), gives a centre NNMP, starts the engine
// and compares the half-pixel and quarter-pixel vectors and NNMPs with the
// reference model. It also checks the timing: hp_valid exactly 27 and
// qp_valid exactly 49 clock edges after the start edge, and that busy falls.
module tb_subpel_me;
  import binme_pkg::*;
  import tb_binme_ref_pkg::*;

  localparam int TRIALS = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            iw_we = 1'b0;
  logic [4:0]      iw_addr = '0;
  logic [21:0]     iw_data = '0;
  logic            rf_we = 1'b0;
  logic [3:0]      rf_addr = '0;
  logic [15:0]     rf_data = '0;
  logic            start = 1'b0;
  nnmp_t           centre_nnmp = '0;
  logic            busy, hp_valid, qp_valid;
  subvec_t         hp_mv, qp_mv;
  nnmp_t           hp_nnmp, qp_nnmp;

  subpel_me dut (.*);

  int checks = 0;
  int failures = 0;
  int n_hp_moved = 0, n_qp_moved = 0, n_centre = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  win_t w;
  blk_t rb;

  initial begin
    int ehx, ehy, ehn, eqx, eqy, eqn;
    int hp_edge, qp_edge, idle_edge;
    int mode, px, py, sl, cen;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int t = 0; t < TRIALS; t++) begin
      // window
      for (int r = 0; r < 22; r++)
        for (int c = 0; c < 22; c++) w[r][c] = bit'($urandom_range(0, 1));
      // reference from a chosen plane: 0 integer, 1 half pel, 2 quarter pel
      mode = $urandom_range(0, 2);
      sl   = $urandom_range(0, 7);
      ref_sl($urandom_range(0, 7), px, py);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          case (mode)
            0: rb[i][j] = w[3+i][3+j];
            1: rb[i][j] = ref_grid(w, 2*(3+i) - py, 2*(3+j) + px);
            default: rb[i][j] = ref_qp_pixel(w, px, py, sl, i, j);
          endcase
        end
      repeat ($urandom_range(0, 12)) begin
          int fr, fc;
          fr = $urandom_range(0, 15);
          fc = $urandom_range(0, 15);
          rb[fr][fc] = ~rb[fr][fc];
        end
      // centre: the true integer NNMP, sometimes lowered to make it win
      cen = 0;
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) if (rb[i][j] != w[3+i][3+j]) cen++;
      if (t % 7 == 3) cen = cen / 4;

      // load memories
      for (int r = 0; r < 22; r++) begin
        iw_we <= 1'b1; iw_addr <= 5'(r);
        for (int c = 0; c < 22; c++) iw_data[c] <= w[r][c];
        @(posedge clk);
      end
      iw_we <= 1'b0;
      for (int r = 0; r < 16; r++) begin
        rf_we <= 1'b1; rf_addr <= 4'(r);
        for (int c = 0; c < 16; c++) rf_data[c] <= rb[r][c];
        @(posedge clk);
      end
      rf_we <= 1'b0;
      centre_nnmp <= nnmp_t'(cen);
      start <= 1'b1;
      @(posedge clk);              // edge 0
      start <= 1'b0;

      ref_subpel(w, rb, cen, ehx, ehy, ehn, eqx, eqy, eqn);

      hp_edge = -1; qp_edge = -1; idle_edge = -1;
      for (int e = 1; e <= 60; e++) begin
        @(posedge clk);
        #1;
        if (hp_valid) begin
          hp_edge = e;
          check(int'(hp_mv.x) == ehx && int'(hp_mv.y) == ehy,
                $sformatf("trial %0d hp_mv (%0d,%0d) expected (%0d,%0d)", t, hp_mv.x, hp_mv.y, ehx, ehy));
          check(int'(hp_nnmp) == ehn, $sformatf("trial %0d hp_nnmp %0d expected %0d", t, hp_nnmp, ehn));
        end
        if (qp_valid) begin
          qp_edge = e;
          check(int'(qp_mv.x) == eqx && int'(qp_mv.y) == eqy,
                $sformatf("trial %0d qp_mv (%0d,%0d) expected (%0d,%0d)", t, qp_mv.x, qp_mv.y, eqx, eqy));
          check(int'(qp_nnmp) == eqn, $sformatf("trial %0d qp_nnmp %0d expected %0d", t, qp_nnmp, eqn));
        end
        if (!busy && idle_edge < 0) idle_edge = e;
      end
      check(hp_edge == 27, $sformatf("trial %0d hp_valid at edge %0d, expected 27", t, hp_edge));
      check(qp_edge == 49, $sformatf("trial %0d qp_valid at edge %0d, expected 49", t, qp_edge));
      check(idle_edge == 50, $sformatf("trial %0d busy fell at edge %0d, expected 50", t, idle_edge));
      if (ehx != 0 || ehy != 0) n_hp_moved++;
      if (eqx != 0 || eqy != 0) n_qp_moved++;
      if (ehx == 0 && ehy == 0) n_centre++;
    end

    $display("half-pixel moves %0d, quarter-pixel moves %0d, centre kept %0d",
             n_hp_moved, n_qp_moved, n_centre);
    check(n_hp_moved > 0 && n_qp_moved > 0 && n_centre > 0, "not every outcome was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
