// binary_me_top: quarter-pixel accurate binary motion estimation of 16x16
// blocks: integer full search followed by half- and quarter-pixel refinement,
// all on one-bit-per-pixel (one-bit-transformed) frames.
//
// Blocks:
//   search area memory   (2*RANGE+21)^2 pixels: the integer search window of
//                        (2*RANGE+15)^2 pixels plus a 3-pixel margin on every
//                        side that the six-tap half-pixel filter needs.
//   reference memory     the 16x16 current block.
//   integer_me           SPBLA full search over [-RANGE, RANGE-1].
//   window loader        copies the 22x22 integer pixels around the integer
//                        winner, and the reference block, into subpel_me.
//   subpel_me            half- then quarter-pixel search (49 cycles).
//
// The two engines run as a two-stage pipeline: once the loader has copied a
// block's window (22 cycles after integer_me finishes), ready rises again and
// the next block can be written and started while subpel_me is still working
// on the previous one. The loader waits if subpel_me is still busy.
//
// Host protocol: while ready is high, write rows of the search area (sa_*,
// row address 0..2*RANGE+20, bit j = column j) and of the reference block
// (rb_*), then pulse start. The search area's pixel (3+16+vy+i, 3+16+vx+j)
// is the pixel (i, j) of the candidate block for integer vector (vx, vy).
// Results: int_valid pulses with the integer vector (1039 edges after start
// for RANGE = 16); res_valid pulses when the quarter-pixel result of a block
// is ready, with its integer, half and quarter parts and the combined vector
// qmv_x/qmv_y in quarter pixels (x right, y down):
//   qmv_x = 4*int_x + 2*hp.x + qp.x,   qmv_y = 4*int_y - 2*hp.y - qp.y
// (hp and qp use x right, y up). res_nnmp is the NNMP of the final location.
//
// The split into integer and sub-pixel engines, their pipelined use and the
// 22x22 window follow the published design; the shared search-area memory
// with its margin, the loader and the host protocol are this design's.
module binary_me_top
  import binme_pkg::*;
#(
  parameter int unsigned RANGE = 16,
  localparam int unsigned SA   = 2 * RANGE + BLK - 1 + 6,   // 53
  localparam int unsigned SAW  = $clog2(SA),
  localparam int unsigned VW   = $clog2(2 * RANGE) + 1      // vector width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sa_we,
  input  logic [SAW-1:0]       sa_addr,
  input  logic [SA-1:0]        sa_data,
  input  logic                 rb_we,
  input  logic [3:0]           rb_addr,
  input  logic [15:0]          rb_data,
  input  logic                 start,
  output logic                 ready,
  output logic                 int_valid,
  output logic signed [VW-1:0] int_mv_x,
  output logic signed [VW-1:0] int_mv_y,
  output nnmp_t                int_nnmp,
  output logic                 res_valid,
  output logic signed [VW-1:0] res_int_x,
  output logic signed [VW-1:0] res_int_y,
  output subvec_t              res_hp,
  output subvec_t              res_qp,
  output logic signed [VW+2:0] qmv_x,
  output logic signed [VW+2:0] qmv_y,
  output nnmp_t                res_nnmp
);

  localparam int unsigned W   = 2 * RANGE + BLK - 1;        // 47
  localparam int unsigned IRW = $clog2(W);
  localparam int unsigned ICW = $clog2(2 * RANGE);

  typedef enum logic [1:0] {T_IDLE, T_INT, T_WAIT, T_LOAD} tstate_t;
  tstate_t tstate;

  // ------------------------------------------------------------- memories
  logic [SAW-1:0] sa_raddr [3];
  logic [SA-1:0]  sa_rdata [3];
  bitplane_mem #(.ROWS(SA), .COLS(SA), .NRD(3)) u_sa_mem (
    .clk(clk), .we(sa_we && ready), .waddr(sa_addr), .wdata(sa_data),
    .raddr(sa_raddr), .rdata(sa_rdata));

  logic [3:0]  rb_raddr [2];
  logic [15:0] rb_rdata [2];
  bitplane_mem #(.ROWS(BLK), .COLS(BLK), .NRD(2)) u_rb_mem (
    .clk(clk), .we(rb_we && ready), .waddr(rb_addr), .wdata(rb_data),
    .raddr(rb_raddr), .rdata(rb_rdata));

  // ----------------------------------------------------------- integer ME
  logic           ime_busy, ime_done;
  logic [IRW-1:0] s1_row, s2_row;
  logic [ICW-1:0] s1_col, s2_col;
  logic [15:0]    s1_data, s2_data;
  logic [3:0]     ime_ref_addr;

  assign sa_raddr[0] = SAW'(s1_row) + SAW'(3);
  assign sa_raddr[1] = SAW'(s2_row) + SAW'(3);
  assign s1_data     = sa_rdata[0][SAW'(s1_col) + SAW'(3) +: 16];
  assign s2_data     = sa_rdata[1][SAW'(s2_col) + SAW'(3) +: 16];
  assign rb_raddr[0] = ime_ref_addr;

  integer_me #(.RANGE(RANGE)) u_ime (
    .clk(clk), .rst_n(rst_n), .start(start && tstate == T_IDLE),
    .busy(ime_busy), .done(ime_done),
    .s1_row_addr(s1_row), .s1_col(s1_col), .s1_data(s1_data),
    .s2_row_addr(s2_row), .s2_col(s2_col), .s2_data(s2_data),
    .ref_addr(ime_ref_addr), .ref_data(rb_rdata[0]),
    .mv_x(int_mv_x), .mv_y(int_mv_y), .min_nnmp(int_nnmp));

  assign int_valid = ime_done;

  // --------------------------------------------------------- window loader
  logic [4:0]            ld_k;
  logic [SAW-1:0]        ld_row0, ld_col0;
  logic signed [VW-1:0]  blk_x, blk_y;     // integer vector of the block in flight
  nnmp_t                 blk_nnmp;

  assign sa_raddr[2] = ld_row0 + SAW'(ld_k);
  assign rb_raddr[1] = ld_k[3:0];

  logic sp_busy, sp_start, sp_hp_valid, sp_qp_valid;
  subvec_t sp_hp, sp_qp;
  nnmp_t   sp_hp_nnmp, sp_qp_nnmp;

  subpel_me u_spme (
    .clk(clk), .rst_n(rst_n),
    .iw_we(tstate == T_LOAD), .iw_addr(ld_k),
    .iw_data(sa_rdata[2][ld_col0 +: IWIN]),
    .rf_we(tstate == T_LOAD && ld_k < 5'(BLK)), .rf_addr(ld_k[3:0]),
    .rf_data(rb_rdata[1]),
    .start(sp_start), .centre_nnmp(blk_nnmp),
    .busy(sp_busy),
    .hp_valid(sp_hp_valid), .hp_mv(sp_hp), .hp_nnmp(sp_hp_nnmp),
    .qp_valid(sp_qp_valid), .qp_mv(sp_qp), .qp_nnmp(sp_qp_nnmp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate   <= T_IDLE;
      ld_k     <= '0;
      ld_row0  <= '0;
      ld_col0  <= '0;
      blk_x    <= '0;
      blk_y    <= '0;
      blk_nnmp <= '0;
      sp_start <= 1'b0;
    end else begin
      sp_start <= 1'b0;
      case (tstate)
        T_IDLE: if (start) tstate <= T_INT;
        T_INT: if (ime_done) begin
          tstate  <= T_WAIT;
          // window origin: winner's block position minus the 3-pixel margin
          ld_row0 <= SAW'(int_mv_y + $signed(VW'(RANGE)));
          ld_col0 <= SAW'(int_mv_x + $signed(VW'(RANGE)));
        end
        T_WAIT: if (!sp_busy && !sp_start) begin
          tstate   <= T_LOAD;
          ld_k     <= '0;
          blk_x    <= int_mv_x;
          blk_y    <= int_mv_y;
          blk_nnmp <= int_nnmp;
        end
        default: begin   // T_LOAD
          if (ld_k == 5'(IWIN - 1)) begin
            tstate   <= T_IDLE;
            sp_start <= 1'b1;
          end else begin
            ld_k <= ld_k + 5'd1;
          end
        end
      endcase
    end
  end

  assign ready = (tstate == T_IDLE);

  // ---------------------------------------------------------------- results
  // The integer part travels with the block (blk_x/blk_y stay until the next
  // load, which waits for subpel_me to finish).
  assign res_valid = sp_qp_valid;
  assign res_int_x = blk_x;
  assign res_int_y = blk_y;
  assign res_hp    = sp_hp;
  assign res_qp    = sp_qp;
  assign res_nnmp  = sp_qp_nnmp;
  assign qmv_x = (VW+3)'(blk_x) * 4 + (VW+3)'(sp_hp.x) * 2 + (VW+3)'(sp_qp.x);
  assign qmv_y = (VW+3)'(blk_y) * 4 - (VW+3)'(sp_hp.y) * 2 - (VW+3)'(sp_qp.y);

endmodule
