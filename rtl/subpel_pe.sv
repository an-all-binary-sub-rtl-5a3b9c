// subpel_pe: processing element of the sub-pixel search array.
//
// Every cycle with en set it compares one 16-pixel candidate row s with the
// matching 16-pixel reference row r: a 16-bit XOR array, two 256-entry
// popcount tables (one per byte), a 5-bit adder and a 9-bit accumulator that
// holds the NNMP (number of non-matching points) of the candidate block. clr
// restarts the sum with the row presented in the same cycle. After 16 enabled
// cycles nnmp holds the NNMP of a 16x16 block (0..256). Latency: the row
// presented in a cycle is included in nnmp after that cycle's clock edge. The
// structure follows the published PE; the clr/en controls are this design's.
module subpel_pe
  import binme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        clr,
  input  logic [15:0] s,
  input  logic [15:0] r,
  output nnmp_t       nnmp
);

  logic [4:0] cnt;
  assign cnt = row_mismatch(s, r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   nnmp <= '0;
    else if (en)  nnmp <= (clr ? '0 : nnmp) + nnmp_t'(cnt);
    else if (clr) nnmp <= '0;
  end

endmodule
