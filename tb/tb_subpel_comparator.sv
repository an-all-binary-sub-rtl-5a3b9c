// tb_subpel_comparator: self-checking testbench of the nine-way sub-pixel
// comparator.
//
// Applies a new set of eight NNMPs and a centre NNMP every cycle (random,
// with many deliberate ties and centre ties) and checks, after the third
// clock edge counting the one that samples the inputs,
// the winning location, its vector and its NNMP against a direct search:
// centre on a tie with the best, otherwise the lowest location number.
module tb_subpel_comparator;
  import binme_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 1'b0;
  nnmp_t      nnmp [8];
  nnmp_t      centre = '0;
  logic       out_valid;
  subvec_t    best;
  logic [3:0] best_sl;
  nnmp_t      best_nnmp;

  subpel_comparator dut (.*);

  int checks = 0;
  int failures = 0;
  int exp_sl [$];
  int exp_v [$];
  int n_centre = 0, n_moved = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // offsets of SL0..SL7, x right and y up
  int xs [9] = '{-1, 1, 0, 0, -1, 1, -1, 1, 0};
  int ys [9] = '{ 0, 0, 1, -1, 1, 1, -1, -1, 0};

  initial begin
    int bv, bi, lat;
    for (int k = 0; k < 8; k++) nnmp[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      int lo;
      lo = $urandom_range(0, 200);
      for (int k = 0; k < 8; k++) nnmp[k] <= nnmp_t'(lo + $urandom_range(0, (t % 2 == 1) ? 3 : 50));
      centre   <= nnmp_t'(lo + $urandom_range(0, 4));
      in_valid <= 1'b1;
      #1;
      bv = int'(centre); bi = 8;
      for (int k = 0; k < 8; k++) if (int'(nnmp[k]) < bv) begin bv = int'(nnmp[k]); bi = k; end
      exp_sl.push_back(bi);
      exp_v.push_back(bv);
      if (bi == 8) n_centre++; else n_moved++;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_sl.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_sl.size()); end
    checks++;
    if (n_centre == 0 || n_moved == 0) begin failures++; $display("FAIL: outcomes not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check every result three edges after its inputs
  int issued [$];
  int edge_no = 0;
  always @(posedge clk) begin
    edge_no++;
    if (in_valid) issued.push_back(edge_no);
    #1;
    if (out_valid) begin
      int s, v, e;
      subvec_t ev;
      s = exp_sl.pop_front();
      v = exp_v.pop_front();
      e = issued.pop_front();
      checks++;
      ev.x = 2'(xs[s]);
      ev.y = 2'(ys[s]);
      if (int'(best_sl) != s || int'(best_nnmp) != v || best != ev || edge_no - e != 2) begin
        failures++;
        $display("FAIL: got SL%0d %b nnmp %0d after %0d edges, expected SL%0d %b nnmp %0d after 3",
                 best_sl, best, best_nnmp, edge_no - e + 1, s, ev, v);
      end
    end
  end

endmodule
