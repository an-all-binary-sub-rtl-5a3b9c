// subpel_me: binary (one bit per pixel) half- and quarter-pixel motion
// estimation around an integer motion vector, for one 16x16 block.
//
// Contents: a 22x22 integer pixel window memory (the block sits at rows and
// columns 3..18, i.e. the integer winner plus a 3-pixel filter margin), a
// 16x16 reference block memory, the half-pixel interpolator, the half-pixel
// memory, the quarter-pixel interpolator, a multiplexer that feeds either
// interpolator to one shared array of eight sub-pixel PEs, the shared
// comparator, and the control that sequences them.
//
// Operation, counted in clock edges after the edge that samples start:
//   1..22   integer rows 0..21 are read (registered) and streamed into the
//           half-pixel interpolator; A, B and C rows are written to the
//           half-pixel memory as they appear.
//   9..24   half-pixel search, pipelined with the interpolation: block row r
//           is matched at edge r+9 in all eight half-pixel locations, as soon
//           as B and C row r+1 leave the interpolator (rows A r+3, B r and
//           C r are read back from the half-pixel memory).
//   25..27  comparison against the centre (integer) NNMP; hp_valid pulses
//           after edge 27 with hp_mv/hp_nnmp.
//   28      the half-pixel vector is latched; quarter-pixel work begins.
//   29..44  one block row per cycle is read from the integer and half-pixel
//           memories, 30..45 the eight quarter-pixel rows are formed and
//           registered, 31..46 the PEs accumulate.
//   47..49  comparison against the half-pixel winner; qp_valid pulses after
//           edge 49 with qp_mv/qp_nnmp.
// A block therefore takes 49 cycles, and busy drops one edge later.
// The search location order (SL0..SL7), the vector convention (x right, y
// up) and the tie rule are those of subpel_comparator. The final vector in
// quarter pixels relative to the integer vector is 2*hp_mv + qp_mv.
//
// The memory sizes, the shared PE array and comparator, the MUX, the order
// (half-pixel interpolation pipelined with the half-pixel search, quarter
// pixels after it) and the 22/27/49-cycle landmarks follow the published
// design. The use of the integer NNMP as the centre candidate, the
// registering points between the landmarks and the write ports are this
// design's choices. Memories may only be written while busy is low.
module subpel_me
  import binme_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // integer pixel window write port (row address 0..21)
  input  logic            iw_we,
  input  logic [4:0]      iw_addr,
  input  logic [IWIN-1:0] iw_data,
  // reference block write port (row address 0..15)
  input  logic            rf_we,
  input  logic [3:0]      rf_addr,
  input  logic [15:0]     rf_data,
  // control
  input  logic            start,
  input  nnmp_t           centre_nnmp,   // NNMP of the integer winner
  output logic            busy,
  output logic            hp_valid,
  output subvec_t         hp_mv,
  output nnmp_t           hp_nnmp,
  output logic            qp_valid,
  output subvec_t         qp_mv,
  output nnmp_t           qp_nnmp
);

  typedef enum logic [1:0] {S_IDLE, S_HP, S_QP} state_t;
  state_t state;

  logic       go;
  assign go = start && (state == S_IDLE);

  // ---------------------------------------------------------------- memories
  logic [4:0]       int_raddr [4];
  logic [IWIN-1:0]  int_rdata [4];
  bitplane_mem #(.ROWS(IWIN), .COLS(IWIN), .NRD(4)) u_int_mem (
    .clk(clk), .we(iw_we), .waddr(iw_addr), .wdata(iw_data),
    .raddr(int_raddr), .rdata(int_rdata));

  logic [3:0]  ref_raddr [1];
  logic [15:0] ref_rdata [1];
  bitplane_mem #(.ROWS(BLK), .COLS(BLK), .NRD(1)) u_ref_mem (
    .clk(clk), .we(rf_we), .waddr(rf_addr), .wdata(rf_data),
    .raddr(ref_raddr), .rdata(ref_rdata));

  // ------------------------------------------- integer row streaming (1..22)
  logic [4:0]      rd_row;
  logic            rd_on;
  logic [IWIN-1:0] int_q;
  logic            int_q_valid;

  assign int_raddr[0] = rd_row;

  // ---------------------------------------------------- half-pixel datapath
  logic              a_valid, bc_valid;
  logic [4:0]        a_idx, bc_idx;
  logic [NA_COL-1:0] a_row, c_row;
  logic [NB_COL-1:0] b_row;

  half_pel_interp u_hpi (
    .clk(clk), .rst_n(rst_n), .clr(go),
    .in_valid(int_q_valid), .in_row(int_q),
    .a_valid(a_valid), .a_idx(a_idx), .a_row(a_row),
    .bc_valid(bc_valid), .bc_idx(bc_idx), .b_row(b_row), .c_row(c_row));

  logic [4:0]        a_raddr [3];
  logic [NA_COL-1:0] a_rdata [3];
  logic [4:0]        b_raddr [2];
  logic [NB_COL-1:0] b_rdata [2];
  logic [4:0]        c_raddr [2];
  logic [NA_COL-1:0] c_rdata [2];

  half_pel_memory u_hpm (
    .clk(clk),
    .a_we(a_valid && a_idx >= 5'd2 && a_idx <= 5'd19), .a_waddr(a_idx - 5'd2), .a_wdata(a_row),
    .b_we(bc_valid), .b_waddr(bc_idx), .b_wdata(b_row),
    .c_we(bc_valid), .c_waddr(bc_idx), .c_wdata(c_row),
    .a_raddr(a_raddr), .a_rdata(a_rdata),
    .b_raddr(b_raddr), .b_rdata(b_rdata),
    .c_raddr(c_raddr), .c_rdata(c_rdata));

  // half-pixel search: block row r = bc_idx-1 while B/C row r+1 is produced
  logic       hp_act;
  logic [4:0] hp_r;
  assign hp_act = bc_valid && (bc_idx >= 5'd1) && (state == S_HP);
  assign hp_r   = bc_idx - 5'd1;

  logic [15:0] hp_rows [8];
  always_comb begin
    hp_rows[0] = a_rdata[0][15:0];   // SL0 (-1, 0): A left of the pixel
    hp_rows[1] = a_rdata[0][16:1];   // SL1 (+1, 0): A right
    hp_rows[2] = b_rdata[0][16:1];   // SL2 ( 0,+1): B above
    hp_rows[3] = b_row[16:1];        // SL3 ( 0,-1): B below
    hp_rows[4] = c_rdata[0][15:0];   // SL4 (-1,+1): C above left
    hp_rows[5] = c_rdata[0][16:1];   // SL5 (+1,+1): C above right
    hp_rows[6] = c_row[15:0];        // SL6 (-1,-1): C below left
    hp_rows[7] = c_row[16:1];        // SL7 (+1,-1): C below right
  end

  // ------------------------------------------------- quarter-pixel datapath
  subvec_t           hp_reg;
  nnmp_t             hp_nnmp_reg;
  logic              q_on;
  logic [3:0]        q_row;
  logic              qrd_valid;
  logic [3:0]        qrd_r;
  logic [NB_COL-1:0] qi_rows [3];
  logic [NA_COL-1:0] qa_rows [3];
  logic [NB_COL-1:0] qb_rows [2];
  logic [NA_COL-1:0] qc_rows [2];
  logic [15:0]       qp_rows [8];
  logic [15:0]       qp_q [8];
  logic              qp_q_valid;
  logic [3:0]        qp_q_r;

  always_comb begin
    for (int k = 0; k < 3; k++) int_raddr[k+1] = 5'(q_row) + 5'(k + 2);
    a_raddr[0] = (state == S_HP) ? hp_r + 5'd1 : 5'(q_row);
    a_raddr[1] = 5'(q_row) + 5'd1;
    a_raddr[2] = 5'(q_row) + 5'd2;
    b_raddr[0] = (state == S_HP) ? hp_r : 5'(q_row);
    b_raddr[1] = 5'(q_row) + 5'd1;
    c_raddr[0] = (state == S_HP) ? hp_r : 5'(q_row);
    c_raddr[1] = 5'(q_row) + 5'd1;
  end

  quarter_pel_interp u_qpi (
    .hp(hp_reg), .i_rows(qi_rows), .a_rows(qa_rows), .b_rows(qb_rows),
    .c_rows(qc_rows), .qp_rows(qp_rows));

  // ---------------------------------------------- MUX, PE array, comparator
  logic        pe_en, pe_clr;
  logic [15:0] pe_s [8];
  nnmp_t       pe_nnmp [8];

  always_comb begin
    if (state == S_HP) begin
      pe_en        = hp_act;
      pe_clr       = hp_act && (hp_r == 5'd0);
      ref_raddr[0] = hp_r[3:0];
      pe_s         = hp_rows;
    end else begin
      pe_en        = qp_q_valid;
      pe_clr       = qp_q_valid && (qp_q_r == 4'd0);
      ref_raddr[0] = qp_q_r;
      pe_s         = qp_q;
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_pe
    subpel_pe u_pe (
      .clk(clk), .rst_n(rst_n), .en(pe_en), .clr(pe_clr),
      .s(pe_s[k]), .r(ref_rdata[0]), .nnmp(pe_nnmp[k]));
  end

  logic    last_row_q;     // the PEs hold complete NNMPs
  nnmp_t   centre_reg;
  logic    cmp_valid;
  subvec_t cmp_best;
  logic [3:0] cmp_sl;
  nnmp_t   cmp_nnmp;
  subvec_t qp_mv_reg;
  nnmp_t   qp_nnmp_reg;

  subpel_comparator u_cmp (
    .clk(clk), .rst_n(rst_n), .in_valid(last_row_q), .nnmp(pe_nnmp),
    .centre((state == S_HP) ? centre_reg : hp_nnmp_reg),
    .out_valid(cmp_valid), .best(cmp_best), .best_sl(cmp_sl), .best_nnmp(cmp_nnmp));

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rd_on       <= 1'b0;
      rd_row      <= '0;
      int_q       <= '0;
      int_q_valid <= 1'b0;
      centre_reg  <= '0;
      hp_reg      <= '0;
      hp_nnmp_reg <= '0;
      q_on        <= 1'b0;
      q_row       <= '0;
      qrd_valid   <= 1'b0;
      qrd_r       <= '0;
      qp_q_valid  <= 1'b0;
      qp_q_r      <= '0;
      last_row_q  <= 1'b0;
      qp_mv_reg   <= '0;
      qp_nnmp_reg <= '0;
      for (int k = 0; k < 3; k++) begin qi_rows[k] <= '0; qa_rows[k] <= '0; end
      for (int k = 0; k < 2; k++) begin qb_rows[k] <= '0; qc_rows[k] <= '0; end
      for (int k = 0; k < 8; k++) qp_q[k] <= '0;
    end else begin
      // integer row streaming
      int_q       <= int_rdata[0];
      int_q_valid <= rd_on;
      if (rd_on) begin
        rd_row <= rd_row + 5'd1;
        if (rd_row == 5'(IWIN - 1)) rd_on <= 1'b0;
      end
      // quarter-pixel row reads (registered, like a synchronous RAM)
      qrd_valid <= q_on;
      qrd_r     <= q_row;
      for (int k = 0; k < 3; k++) begin
        qi_rows[k] <= int_rdata[k+1][2 +: NB_COL];
        qa_rows[k] <= a_rdata[k];
      end
      for (int k = 0; k < 2; k++) begin
        qb_rows[k] <= b_rdata[k];
        qc_rows[k] <= c_rdata[k];
      end
      if (q_on) begin
        q_row <= q_row + 4'd1;
        if (q_row == 4'd15) q_on <= 1'b0;
      end
      // quarter-pixel interpolation register
      qp_q_valid <= qrd_valid;
      qp_q_r     <= qrd_r;
      qp_q       <= qp_rows;
      // end of a search: last block row accumulated
      last_row_q <= (hp_act && hp_r == 5'd15) ||
                    (state == S_QP && qp_q_valid && qp_q_r == 4'd15);

      case (state)
        S_IDLE: if (start) begin
          state      <= S_HP;
          rd_on      <= 1'b1;
          rd_row     <= '0;
          centre_reg <= centre_nnmp;
        end
        S_HP: if (cmp_valid) begin
          state       <= S_QP;
          hp_reg      <= cmp_best;
          hp_nnmp_reg <= cmp_nnmp;
          q_on        <= 1'b1;
          q_row       <= '0;
        end
        default: if (cmp_valid) begin
          state   <= S_IDLE;
          qp_mv_reg   <= cmp_best;
          qp_nnmp_reg <= cmp_nnmp;
        end
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign hp_valid = (state == S_HP) && cmp_valid;
  assign hp_mv    = hp_valid ? cmp_best : hp_reg;
  assign hp_nnmp  = hp_valid ? cmp_nnmp : hp_nnmp_reg;
  assign qp_valid = (state == S_QP) && cmp_valid;
  assign qp_mv    = qp_valid ? cmp_best : qp_mv_reg;
  assign qp_nnmp  = qp_valid ? cmp_nnmp : qp_nnmp_reg;

  // The memories must not change under a running search.
  assert property (@(posedge clk) disable iff (!rst_n) (iw_we || rf_we) |-> !busy);

endmodule
