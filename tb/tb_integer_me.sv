// tb_integer_me: self-checking testbench of the integer SPBLA motion
// estimator at its full size (16x16 block, search range [-16,15]).
//
// The testbench plays the search-window and reference memories: it answers
// the two search-bus addresses and the reference address combinationally
// from its own 47x47 and 16x16 bit arrays. Each trial plants the reference
// block at a random integer vector of a random window, flips a few pixels,
// and compares the vector and NNMP with an exhaustive search (first minimum
// in column-major candidate order). A flat trial (every candidate equal)
// checks the tie rule. done must come exactly 1039 clock edges after the
// start edge.
module tb_integer_me;
  import binme_pkg::*;

  localparam int RANGE = 16;
  localparam int P = 2 * RANGE;
  localparam int W = P + 15;
  localparam int TRIALS = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  logic        busy, done;
  logic [5:0]  s1_row_addr, s2_row_addr;
  logic [4:0]  s1_col, s2_col;
  logic [15:0] s1_data, s2_data, ref_data;
  logic [3:0]  ref_addr;
  logic signed [5:0] mv_x, mv_y;
  nnmp_t       min_nnmp;

  bit win [W][W];
  bit rb [16][16];

  function automatic logic [15:0] slice(input int row, input int col);
    logic [15:0] v;
    for (int j = 0; j < 16; j++) v[j] = (row < W && col + j < W) ? win[row][col+j] : 1'b0;
    return v;
  endfunction

  always_comb begin
    s1_data = slice(int'(s1_row_addr), int'(s1_col));
    s2_data = slice(int'(s2_row_addr), int'(s2_col));
    for (int j = 0; j < 16; j++) ref_data[j] = rb[ref_addr][j];
  end

  integer_me #(.RANGE(RANGE)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vx, vy, best, bx, by, d, done_edge;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < TRIALS; t++) begin
      vx = $urandom_range(0, P - 1);
      vy = $urandom_range(0, P - 1);
      if (t == 1) begin vx = 0; vy = 0; end
      if (t == 2) begin vx = P - 1; vy = P - 1; end
      for (int r = 0; r < W; r++)
        for (int c = 0; c < W; c++) win[r][c] = (t == TRIALS - 1) ? 1'b0 : bit'($urandom_range(0, 1));
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) rb[i][j] = win[vy+i][vx+j];
      if (t != TRIALS - 1)
        repeat ($urandom_range(0, 20)) begin
          int fr, fc;
          fr = $urandom_range(0, 15);
          fc = $urandom_range(0, 15);
          rb[fr][fc] = ~rb[fr][fc];
        end
      // exhaustive search in the array's candidate order
      best = 1000; bx = 0; by = 0;
      for (int x = 0; x < P; x++)
        for (int v = 0; v < P; v++) begin
          d = 0;
          for (int i = 0; i < 16; i++)
            for (int j = 0; j < 16; j++) if (rb[i][j] != win[v+i][x+j]) d++;
          if (d < best) begin best = d; bx = x; by = v; end
        end

      start <= 1'b1;
      @(posedge clk);                 // edge 0
      start <= 1'b0;
      done_edge = -1;
      for (int e = 1; e <= 1100; e++) begin
        @(posedge clk);
        #1;
        if (done) begin
          done_edge = e;
          check(int'(mv_x) == bx - RANGE && int'(mv_y) == by - RANGE,
                $sformatf("trial %0d mv (%0d,%0d) expected (%0d,%0d)", t, mv_x, mv_y, bx - RANGE, by - RANGE));
          check(int'(min_nnmp) == best, $sformatf("trial %0d nnmp %0d expected %0d", t, min_nnmp, best));
        end
      end
      check(done_edge == P * P + 15, $sformatf("trial %0d done at edge %0d, expected %0d", t, done_edge, P * P + 15));
      check(!busy, "busy still high after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
