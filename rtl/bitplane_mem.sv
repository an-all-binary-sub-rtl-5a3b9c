// bitplane_mem: a small one-bit-per-pixel frame store, organised as ROWS words
// of COLS pixels (one image row per word, bit j = pixel column j).
//
// One synchronous write port writes a whole row per cycle; NRD read ports
// return whole rows combinationally, as register-file or distributed-RAM
// storage would. Out-of-range read addresses return row ROWS-1. There is no
// reset: every row is written before it is read. Used for the integer pixel
// window, the reference block, the half-pixel stores and the search area.
// The 22x22, 16x16 and half-pixel store sizes follow the published memories;
// the 53x53 search area, the row-per-word organisation and the combinational
// reads are this design's choices.
module bitplane_mem #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  parameter int unsigned NRD  = 1,
  localparam int unsigned AW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [COLS-1:0]      wdata,
  input  logic [AW-1:0]        raddr [NRD],
  output logic [COLS-1:0]      rdata [NRD]
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < ROWS)) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rdata[p] = (int'(raddr[p]) < ROWS) ? mem[raddr[p]] : mem[ROWS-1];
    end
  end

endmodule
