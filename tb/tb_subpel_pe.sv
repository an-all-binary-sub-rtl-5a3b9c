// tb_subpel_pe: self-checking testbench of the sub-pixel processing element.
//
// Runs random 16-row blocks (with clr on the first row and occasional idle
// cycles) and compares the accumulated NNMP with a count of differing pixels
// kept by the testbench; a clr without en must empty the accumulator.
module tb_subpel_pe;
  import binme_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en = 1'b0, clr = 1'b0;
  logic [15:0] s = '0, r = '0;
  nnmp_t       nnmp;

  subpel_pe dut (.*);

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 100; b++) begin
      expv = 0;
      for (int row = 0; row < 16; row++) begin
        while ($urandom_range(0, 4) == 0) begin
          en <= 1'b0; clr <= 1'b0;
          @(posedge clk);
        end
        en  <= 1'b1;
        clr <= (row == 0);
        s   <= 16'($urandom);
        r   <= (b % 10 == 0) ? '1 : 16'($urandom);
        #1;
        expv += $countones(s ^ r);
        @(posedge clk);
        #1;
        checks++;
        if (int'(nnmp) != expv) begin
          failures++;
          $display("FAIL: block %0d row %0d nnmp %0d expected %0d", b, row, nnmp, expv);
        end
      end
      en <= 1'b0; clr <= 1'b0;
      @(posedge clk);
    end
    en <= 1'b0; clr <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (nnmp != '0) begin failures++; $display("FAIL: clr did not empty the sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
