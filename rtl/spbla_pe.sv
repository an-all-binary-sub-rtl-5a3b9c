// spbla_pe: one processing element of the integer-pel source-pixel-based
// linear array (SPBLA).
//
// Each PE owns one row of the 16x16 binary reference block. The row arrives on
// the shared r bus; in the cycle the controller asserts r_load the PE uses the
// bus value directly and latches it, afterwards it uses the latched copy. The
// PE picks the search row from bus s1 or s2 (sel_s2), XORs it with the
// reference row in two 8-bit halves, counts the ones of each half with a
// 256-entry popcount table, adds the two counts and adds the result to the
// partial NNMP (number of non-matching points) handed over by the previous PE.
//
// Interface: sum is the combinational partial NNMP (acc_in + row mismatch),
// acc_out is that value registered for the next PE. Latency: one cycle from
// acc_in to acc_out. The structure (latch, mux, XOR arrays, LUTs, adder,
// accumulation with acc_{i-1}) follows the published PE; widths other than
// the 16-bit rows and 4/5-bit counts are this design's choice.
module spbla_pe
  import binme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        r_load,   // take r_in now and latch it
  input  logic [15:0] r_in,
  input  logic [15:0] s1,
  input  logic [15:0] s2,
  input  logic        sel_s2,   // 1: compare against s2, 0: against s1
  input  nnmp_t       acc_in,   // partial NNMP from PE i-1 (0 for PE 0)
  output nnmp_t       sum,      // acc_in + mismatches of this row (combinational)
  output nnmp_t       acc_out   // registered sum, to PE i+1
);

  logic [15:0] r_lat;
  logic [15:0] r_eff;
  logic [15:0] s_sel;

  assign r_eff = r_load ? r_in : r_lat;
  assign s_sel = sel_s2 ? s2 : s1;
  assign sum   = acc_in + nnmp_t'(row_mismatch(s_sel, r_eff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_lat   <= '0;
      acc_out <= '0;
    end else begin
      if (r_load) r_lat <= r_in;
      acc_out <= sum;
    end
  end

endmodule
