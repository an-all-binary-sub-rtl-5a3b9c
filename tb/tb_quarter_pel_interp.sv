// tb_quarter_pel_interp: self-checking testbench of the eight quarter-pixel
// datapaths.
//
// Builds random 22x22 windows, takes the integer, A, B and C rows that the
// datapaths see for a random block row, and for every one of the nine
// half-pixel results and eight locations compares each quarter pixel with the
// OR of the two operands that the quarter-pixel strategy table names for it
// (looked up by name in the reference model).
module tb_quarter_pel_interp;
  import binme_pkg::*;
  import tb_binme_ref_pkg::*;

  subvec_t     hp;
  logic [17:0] i_rows [3];
  logic [16:0] a_rows [3];
  logic [17:0] b_rows [2];
  logic [16:0] c_rows [2];
  logic [15:0] qp_rows [8];

  quarter_pel_interp dut (.*);

  int checks = 0;
  int failures = 0;
  win_t w;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int t = 0; t < 40; t++) begin
      for (int rr = 0; rr < 22; rr++)
        for (int c = 0; c < 22; c++) w[rr][c] = bit'($urandom_range(0, 1));
      r = (t < 16) ? t : $urandom_range(0, 15);
      // rows around block row r (integer row r+3)
      for (int k = 0; k < 3; k++) begin
        for (int j = 0; j < 18; j++) i_rows[k][j] = w[r+2+k][j+2];
        for (int j = 0; j < 17; j++) a_rows[k][j] = ref_grid(w, 2*(r+2+k), 2*(j+2) + 1);
      end
      for (int k = 0; k < 2; k++) begin
        for (int j = 0; j < 18; j++) b_rows[k][j] = ref_grid(w, 2*(r+k+2) + 1, 2*(j+2));
        for (int j = 0; j < 17; j++) c_rows[k][j] = ref_grid(w, 2*(r+k+2) + 1, 2*(j+2) + 1);
      end
      for (int hy = -1; hy <= 1; hy++)
        for (int hx = -1; hx <= 1; hx++) begin
          hp.x = 2'(hx);
          hp.y = 2'(hy);
          #1;
          for (int sl = 0; sl < 8; sl++) begin
            logic [15:0] e;
            for (int j = 0; j < 16; j++) e[j] = ref_qp_pixel(w, hx, hy, sl, r, j);
            checks++;
            if (qp_rows[sl] !== e) begin
              failures++;
              $display("FAIL: row %0d hp (%0d,%0d) SL%0d = %h expected %h", r, hx, hy, sl, qp_rows[sl], e);
            end
          end
        end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
