// l3m_router: the L3M multilayer maze-routing accelerator.
//
// An NX x NY array of cells is time-multiplexed over NL layers: each cell
// keeps the state of its grid column of nodes in a shift register and
// processes one layer per clock. The control unit receives commands from a
// host as a byte stream, drives the array through the global CMD, PF, PFV,
// /TOP and select lines, and reads back the wired-NOR STATUS bus. A ROUTE
// command clears old labels, expands a wavefront from the source until the
// target is reached, and traces the path back, turning it into an obstacle
// and reporting the wire's corner points.
//
// Ports: clk, rst (synchronous, active high); rx_* carries command bytes in,
// tx_* carries reply bytes out (a byte moves when valid and ready are both
// high); pf_in[z] sets the east-west / north-south preference of layer z
// during expansion (all 2'b11 for plain shortest-path routing). The published design uses an
// RS-232 interface for the byte stream; here the byte stream is brought out
// directly. The default 8 x 8 x 4 grid is the published prototype's size.
module l3m_router
  import l3m_pkg::*;
#(
  parameter int unsigned NX     = 8,
  parameter int unsigned NY     = 8,
  parameter int unsigned NL     = 4,
  parameter bit          USE_VP = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  input  logic [1:0] pf_in [NL]
);

  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1;
  localparam int unsigned YW = (NY > 1) ? $clog2(NY) : 1;

  cell_cmd_t     cmd;
  logic [1:0]    pf;
  logic          pfv, ntop, lsel;
  logic [XW-1:0] col_a1, col_a2;
  logic [YW-1:0] row_a1, row_a2;
  logic [2:0]    status;

  l3m_control #(.NX(NX), .NY(NY), .NL(NL), .USE_VP(USE_VP)) u_ctrl (
    .clk(clk), .rst(rst),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .pf_in(pf_in),
    .cmd(cmd), .pf(pf), .pfv(pfv), .ntop(ntop), .lsel(lsel),
    .col_a1(col_a1), .col_a2(col_a2), .row_a1(row_a1), .row_a2(row_a2),
    .status(status)
  );

  l3m_array #(.NX(NX), .NY(NY), .NL(NL)) u_array (
    .clk(clk), .cmd(cmd), .pf(pf), .pfv(pfv), .ntop(ntop), .lsel(lsel),
    .col_a1(col_a1), .col_a2(col_a2), .row_a1(row_a1), .row_a2(row_a2),
    .status(status)
  );

endmodule
