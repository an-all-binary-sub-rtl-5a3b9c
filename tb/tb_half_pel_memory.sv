// tb_half_pel_memory: self-checking testbench of the half-pixel store.
//
// Fills the A (18x17), B (17x18) and C (17x17) stores with random rows, some
// rows rewritten, writes to addresses beyond each store ignored, and reads
// every row back through every read port, comparing with a shadow copy.
// The read ports of one store are given different rows in the same cycle.
module tb_half_pel_memory;
  import binme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a_we = 1'b0, b_we = 1'b0, c_we = 1'b0;
  logic [4:0]  a_waddr = '0, b_waddr = '0, c_waddr = '0;
  logic [16:0] a_wdata = '0, c_wdata = '0;
  logic [17:0] b_wdata = '0;
  logic [4:0]  a_raddr [3];
  logic [16:0] a_rdata [3];
  logic [4:0]  b_raddr [2];
  logic [17:0] b_rdata [2];
  logic [4:0]  c_raddr [2];
  logic [16:0] c_rdata [2];

  half_pel_memory dut (.*);

  logic [16:0] sa [18];
  logic [17:0] sb [17];
  logic [16:0] sc [17];
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
    for (int p = 0; p < 3; p++) a_raddr[p] = '0;
    for (int p = 0; p < 2; p++) begin b_raddr[p] = '0; c_raddr[p] = '0; end
    for (int pass = 0; pass < 3; pass++) begin
      for (int k = 0; k < 24; k++) begin
        a_we <= 1'b1; b_we <= 1'b1; c_we <= 1'b1;
        a_waddr <= 5'(k); b_waddr <= 5'(k); c_waddr <= 5'(k);
        a_wdata <= 17'($urandom); b_wdata <= 18'($urandom); c_wdata <= 17'($urandom);
        #1;
        if (k < 18) sa[k] = a_wdata;
        if (k < 17) begin sb[k] = b_wdata; sc[k] = c_wdata; end
        @(posedge clk);
      end
      a_we <= 1'b0; b_we <= 1'b0; c_we <= 1'b0;
      @(posedge clk);
      for (int k = 0; k < 18; k++) begin
        // each port reads a different row, so crossed ports show
        for (int p = 0; p < 3; p++) a_raddr[p] = 5'((k + 5*p) % 18);
        for (int p = 0; p < 2; p++) begin
          b_raddr[p] = 5'((k + 7*p) % 17);
          c_raddr[p] = 5'((k + 3*p) % 17);
        end
        #1;
        for (int p = 0; p < 3; p++) begin
          checks++;
          if (a_rdata[p] !== sa[(k + 5*p) % 18]) begin failures++; $display("FAIL: A row %0d port %0d", (k + 5*p) % 18, p); end
        end
        for (int p = 0; p < 2; p++) begin
          checks += 2;
          if (b_rdata[p] !== sb[(k + 7*p) % 17]) begin failures++; $display("FAIL: B row %0d port %0d", (k + 7*p) % 17, p); end
          if (c_rdata[p] !== sc[(k + 3*p) % 17]) begin failures++; $display("FAIL: C row %0d port %0d", (k + 3*p) % 17, p); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
