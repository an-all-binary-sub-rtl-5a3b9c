// half_pel_memory: store of the binary half pixels of one 16x16 block, kept
// for the quarter-pixel stage (and read back during the half-pixel search).
//
//   A store: 18 rows x 17 pixels, A rows of integer rows 2..19 (row address
//            = integer row - 2).
//   B store: 17 rows x 18 pixels, B row k lies between integer rows k+2, k+3.
//   C store: 17 rows x 17 pixels, same row numbering as B.
//
// Each store has one row-wide synchronous write port and combinational row
// read ports (three for A, two each for B and C), enough for one block row of
// quarter-pixel interpolation per cycle. The three sizes follow the published
// design; the port counts are this design's choice.
module half_pel_memory
  import binme_pkg::*;
(
  input  logic              clk,
  input  logic              a_we,
  input  logic [4:0]        a_waddr,
  input  logic [NA_COL-1:0] a_wdata,
  input  logic              b_we,
  input  logic [4:0]        b_waddr,
  input  logic [NB_COL-1:0] b_wdata,
  input  logic              c_we,
  input  logic [4:0]        c_waddr,
  input  logic [NA_COL-1:0] c_wdata,
  input  logic [4:0]        a_raddr [3],
  output logic [NA_COL-1:0] a_rdata [3],
  input  logic [4:0]        b_raddr [2],
  output logic [NB_COL-1:0] b_rdata [2],
  input  logic [4:0]        c_raddr [2],
  output logic [NA_COL-1:0] c_rdata [2]
);

  bitplane_mem #(.ROWS(NA_ROW), .COLS(NA_COL), .NRD(3)) u_a (
    .clk(clk), .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .raddr(a_raddr), .rdata(a_rdata));

  bitplane_mem #(.ROWS(NC_ROW), .COLS(NB_COL), .NRD(2)) u_b (
    .clk(clk), .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .raddr(b_raddr), .rdata(b_rdata));

  bitplane_mem #(.ROWS(NC_ROW), .COLS(NA_COL), .NRD(2)) u_c (
    .clk(clk), .we(c_we), .waddr(c_waddr), .wdata(c_wdata),
    .raddr(c_raddr), .rdata(c_rdata));

endmodule
