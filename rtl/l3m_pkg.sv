// l3m_pkg: types and constants shared by the L3M multilayer maze router.
//
// A cell holds one of eight states per layer, stored in three bits. The
// encoding doubles as the backtrace code a traced cell puts on the STATUS
// bus, so the control unit can decode a direction straight from the bus.
// The four cell commands travel on a 2-bit CMD bus. The host talks to the
// control unit one byte at a time; the opcode and reply-code values below
// are this design's own choice, the command set itself follows the router's
// command table.
package l3m_pkg;

  // Cell state. XE/XW/XN/XS record which horizontal input expanded the cell
  // (XE: reached through EI, i.e. from the west neighbour, so the path back
  // to the source leaves westward). XU/XD: path back goes up/down a layer.
  typedef enum logic [2:0] {
    ST_E  = 3'd0,  // empty
    ST_BL = 3'd1,  // blocked (obstacle or routed wire)
    ST_XE = 3'd2,
    ST_XW = 3'd3,
    ST_XN = 3'd4,
    ST_XS = 3'd5,
    ST_XU = 3'd6,
    ST_XD = 3'd7
  } cell_state_t;

  // Cell command on the global CMD bus.
  typedef enum logic [1:0] {
    CMD_CLEAR  = 2'd0,
    CMD_SET    = 2'd1,
    CMD_EXPAND = 2'd2,
    CMD_TRACE  = 2'd3
  } cell_cmd_t;

  // Host opcodes.
  localparam logic [7:0] OP_ROUTE      = 8'h01;
  localparam logic [7:0] OP_SELECT     = 8'h02;
  localparam logic [7:0] OP_CLEAR      = 8'h03;
  localparam logic [7:0] OP_CLEARX     = 8'h04;
  localparam logic [7:0] OP_EXPAND     = 8'h05;
  localparam logic [7:0] OP_SET        = 8'h06;
  localparam logic [7:0] OP_TRACE      = 8'h07;
  localparam logic [7:0] OP_GET_XCOUNT = 8'h08;
  localparam logic [7:0] OP_GET_TCOUNT = 8'h09;

  // Reply codes that end a ROUTE reply.
  localparam logic [7:0] RC_SUCCESS = 8'hF0;
  localparam logic [7:0] RC_XFAIL   = 8'hF1;
  localparam logic [7:0] RC_TFAIL   = 8'hF2;

  function automatic logic is_expanded(cell_state_t s);
    return s inside {ST_XE, ST_XW, ST_XN, ST_XS, ST_XU, ST_XD};
  endfunction

  function automatic logic is_horizontal(cell_state_t s);
    return s inside {ST_XE, ST_XW, ST_XN, ST_XS};
  endfunction

endpackage
