// subpel_comparator: picks the best of the eight sub-pixel search locations
// and the centre location.
//
// A three-stage pipelined minimum tree: stage 1 compares the pairs
// (SL0,SL1) (SL2,SL3) (SL4,SL5) (SL6,SL7), stage 2 the two pair winners of
// each half, stage 3 the tree winner against the centre NNMP. On equal NNMP
// the centre wins, and otherwise the lower location number. in_valid is
// sampled with the nine NNMPs; out_valid, best (subvec_t: x right, y up,
// (0,0) for the centre), best_sl (0..7, 8 = centre) and best_nnmp are
// valid after the third clock edge, counting the edge that samples the
// inputs (readable two edges after that one). The comparator is shared by the half- and
// quarter-pixel searches. That it is pipelined, the three stages and the tie
// rule are choices of this design.
module subpel_comparator
  import binme_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  nnmp_t   nnmp [8],
  input  nnmp_t   centre,
  output logic    out_valid,
  output subvec_t best,
  output logic [3:0] best_sl,
  output nnmp_t   best_nnmp
);

  typedef struct packed {
    nnmp_t      v;
    logic [3:0] sl;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.v < a.v) ? b : a;
  endfunction

  cand_t s1 [4];
  cand_t s2 [2];
  cand_t s3;
  nnmp_t c1, c2;
  logic [2:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < 4; i++) s1[i] <= '0;
      for (int i = 0; i < 2; i++) s2[i] <= '0;
      s3 <= '0;
      c1 <= '0;
      c2 <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
      for (int i = 0; i < 4; i++)
        s1[i] <= pick('{v: nnmp[2*i], sl: 4'(2*i)}, '{v: nnmp[2*i+1], sl: 4'(2*i+1)});
      c1 <= centre;
      s2[0] <= pick(s1[0], s1[1]);
      s2[1] <= pick(s1[2], s1[3]);
      c2 <= c1;
      s3 <= pick('{v: c2, sl: 4'd8}, pick(s2[0], s2[1]));
    end
  end

  assign out_valid = vld[2];
  assign best_sl   = s3.sl;
  assign best_nnmp = s3.v;
  assign best      = (s3.sl == 4'd8) ? subvec_t'('0) : sl_offset(int'(s3.sl));

endmodule
