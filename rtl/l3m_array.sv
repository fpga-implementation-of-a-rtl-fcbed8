// l3m_array: the NX x NY array of time-multiplexed L3M cells, with its row
// and column decoders and the STATUS bus.
//
// Column x grows eastward, row y grows southward (row 0 is the north edge).
// Each cell's XO drives the WI input of its west neighbour, EI of its east
// neighbour, NI of its north neighbour and SI of its south neighbour; inputs
// at the array edge are tied low. A cell is selected when its row and column
// decoders select it and lsel is high; lsel carries the layer selection, so a
// command reaches a selected cell only on the cycles its layer is processed.
// CMD, PF, PFV and /TOP are broadcast. The 3-bit STATUS bus is the AND of
// all cells' active-low drives, the logic function of a wired-NOR bus.
// Everything here is combinational apart from the cells' own registers; all
// cells process the same layer on the same cycle.
module l3m_array
  import l3m_pkg::*;
#(
  parameter int unsigned NX = 8,
  parameter int unsigned NY = 8,
  parameter int unsigned NL = 4,
  parameter int unsigned XW = (NX > 1) ? $clog2(NX) : 1,
  parameter int unsigned YW = (NY > 1) ? $clog2(NY) : 1
) (
  input  logic          clk,
  input  cell_cmd_t     cmd,
  input  logic [1:0]    pf,
  input  logic          pfv,
  input  logic          ntop,
  input  logic          lsel,
  input  logic [XW-1:0] col_a1,
  input  logic [XW-1:0] col_a2,
  input  logic [YW-1:0] row_a1,
  input  logic [YW-1:0] row_a2,
  output logic [2:0]    status
);

  logic [NX-1:0] csel;
  logic [NY-1:0] rsel;
  logic          xo   [NY][NX];
  logic [2:0]    cst  [NY][NX];

  l3m_range_decoder #(.N(NX), .W(XW)) u_coldec (
    .en(lsel), .a1(col_a1), .a2(col_a2), .sel(csel));
  l3m_range_decoder #(.N(NY), .W(YW)) u_rowdec (
    .en(lsel), .a1(row_a1), .a2(row_a2), .sel(rsel));

  for (genvar y = 0; y < int'(NY); y++) begin : g_row
    for (genvar x = 0; x < int'(NX); x++) begin : g_col
      logic ei, wi, ni, si;
      always_comb begin
        ei = (x > 0)            ? xo[y][(x > 0) ? x-1 : x] : 1'b0;
        wi = (x < int'(NX) - 1) ? xo[y][(x < int'(NX) - 1) ? x+1 : x] : 1'b0;
        ni = (y < int'(NY) - 1) ? xo[(y < int'(NY) - 1) ? y+1 : y][x] : 1'b0;
        si = (y > 0)            ? xo[(y > 0) ? y-1 : y][x] : 1'b0;
      end

      l3m_cell #(.NL(NL)) u_cell (
        .clk(clk), .cmd(cmd), .sel(rsel[y] && csel[x]),
        .ei(ei), .wi(wi), .ni(ni), .si(si),
        .pf(pf), .pfv(pfv), .ntop(ntop),
        .xo(xo[y][x]), .status(cst[y][x])
      );
    end
  end

  always_comb begin
    status = 3'b111;
    for (int y = 0; y < int'(NY); y++)
      for (int x = 0; x < int'(NX); x++)
        status &= cst[y][x];
  end

endmodule
