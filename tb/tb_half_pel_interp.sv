// tb_half_pel_interp: self-checking testbench of the binary half-pixel
// interpolator.
//
// Streams random 22x22 windows (one row per cycle, with a clr before each
// window and, in some windows, idle cycles between rows) and compares every A
// row, and every B and C row with its index, against the reference model's
// six-tap half pixels computed directly from the window. Counts that all 22
// A rows and 17 B/C rows appear per window.
module tb_half_pel_interp;
  import binme_pkg::*;
  import tb_binme_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clr = 1'b0, in_valid = 1'b0;
  logic [21:0] in_row = '0;
  logic        a_valid, bc_valid;
  logic [4:0]  a_idx, bc_idx;
  logic [16:0] a_row, c_row;
  logic [17:0] b_row;

  half_pel_interp dut (.*);

  int checks = 0;
  int failures = 0;
  win_t w;

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

  // monitor: compare whatever the interpolator presents after each edge
  int n_a, n_bc;
  always @(posedge clk) begin
    #1;
    if (rst_n && a_valid) begin
      logic [16:0] ea;
      n_a++;
      for (int j = 0; j < 17; j++) ea[j] = ref_grid(w, 2*int'(a_idx), 2*(j+2) + 1);
      check(a_row == ea, $sformatf("A row %0d = %h expected %h", a_idx, a_row, ea));
    end
    if (rst_n && bc_valid) begin
      logic [17:0] eb;
      logic [16:0] ec;
      n_bc++;
      for (int j = 0; j < 18; j++) eb[j] = ref_grid(w, 2*(int'(bc_idx)+2) + 1, 2*(j+2));
      for (int j = 0; j < 17; j++) ec[j] = ref_grid(w, 2*(int'(bc_idx)+2) + 1, 2*(j+2) + 1);
      check(b_row == eb, $sformatf("B row %0d = %h expected %h", bc_idx, b_row, eb));
      check(c_row == ec, $sformatf("C row %0d = %h expected %h", bc_idx, c_row, ec));
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < 22; r++)
        for (int c = 0; c < 22; c++) w[r][c] = bit'($urandom_range(0, 1));
      n_a = 0; n_bc = 0;
      clr <= 1'b1;
      @(posedge clk);
      clr <= 1'b0;
      for (int r = 0; r < 22; r++) begin
        if (t % 3 == 1) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int c = 0; c < 22; c++) in_row[c] <= w[r][c];
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
      check(n_a == 22, $sformatf("window %0d: %0d A rows", t, n_a));
      check(n_bc == 17, $sformatf("window %0d: %0d B/C rows", t, n_bc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
