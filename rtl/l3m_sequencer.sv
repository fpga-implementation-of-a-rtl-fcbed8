// l3m_sequencer: state sequencer of one L3M cell (purely combinational).
//
// Given the present state PS of the layer being processed, the global
// command, the cell's select line and the expansion status of its six
// neighbours, it returns the next state NS, the XO output seen by the
// horizontal neighbours, and the cell's drive of the 3-bit STATUS bus.
//
//   CLEAR  : selected cell -> E; unselected expanded cell -> E (so CLEAR with
//            nothing selected removes all expansion labels but no obstacles).
//   SET    : selected cell -> XE (marks the source).
//   TRACE  : selected cell drives its state code on STATUS and becomes BL.
//   EXPAND : an empty cell enters an expanded state if a neighbour is
//            expanded; horizontal inputs are gated by the preference bits
//            (pf[1] for east/west, pf[0] for north/south). Priority is
//            EI, WI, NI, SI, then HI (node above, -> XU) and LI (node below,
//            -> XD). STATUS bit 1 is pulled low by a cell entering an
//            expanded state, bit 0 by the selected (target) cell while it is
//            or becomes expanded.
// Each STATUS bit is active low and is wire-ANDed over the array, matching a
// wired-NOR bus. Bit 2 is only driven low by a traced cell.
// The command table and the E-W-N-S priority follow the published design; the
// position of HI/LI in the priority and the 3-bit trace code are this
// design's choice.
module l3m_sequencer
  import l3m_pkg::*;
(
  input  cell_state_t ps,
  input  cell_cmd_t   cmd,
  input  logic        sel,
  input  logic        ei,      // west neighbour expanded (expansion heading east)
  input  logic        wi,      // east neighbour expanded
  input  logic        ni,      // south neighbour expanded
  input  logic        si,      // north neighbour expanded
  input  logic        hi,      // node on the layer above expanded
  input  logic        li,      // node on the layer below expanded
  input  logic [1:0]  pf,      // {PF1: east/west enable, PF0: north/south enable}
  output cell_state_t ns,
  output logic        xo,
  output logic [2:0]  status
);

  always_comb begin
    ns     = ps;
    status = 3'b111;
    unique case (cmd)
      CMD_CLEAR: begin
        if (sel || is_expanded(ps)) ns = ST_E;
      end
      CMD_SET: begin
        if (sel) ns = ST_XE;
      end
      CMD_TRACE: begin
        if (sel) begin
          ns     = ST_BL;
          status = ps;
        end
      end
      CMD_EXPAND: begin
        if (ps == ST_E) begin
          if      (ei && pf[1]) ns = ST_XE;
          else if (wi && pf[1]) ns = ST_XW;
          else if (ni && pf[0]) ns = ST_XN;
          else if (si && pf[0]) ns = ST_XS;
          else if (hi)          ns = ST_XU;
          else if (li)          ns = ST_XD;
          if (ns != ST_E) status = {1'b1, 1'b0, ~sel};
        end else if (is_expanded(ps)) begin
          status = {1'b1, 1'b1, ~sel};
        end
      end
      default: ;
    endcase
  end

  assign xo = is_expanded(ps);

endmodule
