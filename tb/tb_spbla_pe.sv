// tb_spbla_pe: self-checking testbench of the integer-ME processing element.
//
// Random reference rows are loaded through the r bus; random search rows on
// s1 and s2 and random upstream sums are applied. The combinational sum must
// equal acc_in plus the number of differing pixels between the selected
// search row and the reference row in effect (the bus value in a load cycle,
// the latched one otherwise), and acc_out must carry that sum one edge later.
module tb_spbla_pe;
  import binme_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        r_load = 1'b0;
  logic [15:0] r_in = '0, s1 = '0, s2 = '0;
  logic        sel_s2 = 1'b0;
  nnmp_t       acc_in = '0;
  nnmp_t       sum, acc_out;

  spbla_pe dut (.*);

  int checks = 0;
  int failures = 0;

  function automatic int ones(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rlat, reff, ssel;
    int exp_sum, prev_sum;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    rlat = '0;
    prev_sum = -1;
    for (int k = 0; k < 500; k++) begin
      r_load <= ($urandom_range(0, 3) == 0) || (k == 0);
      r_in   <= 16'($urandom);
      s1     <= 16'($urandom);
      s2     <= 16'($urandom);
      sel_s2 <= 1'($urandom);
      acc_in <= nnmp_t'($urandom_range(0, 240));
      #1;
      reff = r_load ? r_in : rlat;
      ssel = sel_s2 ? s2 : s1;
      exp_sum = int'(acc_in) + ones(reff ^ ssel);
      checks++;
      if (int'(sum) != exp_sum) begin
        failures++;
        $display("FAIL: step %0d sum %0d expected %0d", k, sum, exp_sum);
      end
      if (prev_sum >= 0) begin
        checks++;
        if (int'(acc_out) != prev_sum) begin
          failures++;
          $display("FAIL: step %0d acc_out %0d expected %0d", k, acc_out, prev_sum);
        end
      end
      if (r_load) rlat = r_in;
      prev_sum = exp_sum;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
