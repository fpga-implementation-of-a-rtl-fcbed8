// l3m_cell: one processing element of the L3M array, time-multiplexed over
// NL routing layers.
//
// The state of the layer being processed sits in ST0; the states of the other
// NL-1 layers wait in a shift register. Each clock the sequencer's next state
// is shifted into the top stage and the bottom stage (the layer above the
// current one) is loaded into ST0, so the layers are visited bottom to top,
// one per cycle. XH flags that the bottom stage (layer above) is expanded and
// is masked by /TOP so expansion does not wrap from the top layer to layer 0.
// XL flags that ST0 is expanded; it is masked by /TOP and registered, so on
// the next cycle LI tells the sequencer whether the layer below was expanded
// before its own update.
//
// PFV = 1: normal rotation. PFV = 0: the shift register, the LI flip-flop
// (and, outside the cell, the layer counter) hold, and NS is fed straight back
// into ST0, so the same layer is processed again on the next cycle.
//
// Timing: XO and STATUS are combinational from ST0 and the inputs of the
// current cycle; NS is registered at the clock edge. No reset: as in an SRL
// based cell, the contents are defined by a CLEAR with all cells selected
// held for NL cycles. The structure follows the published L3M cell diagram; the
// connection of both enables to PFV is this design's reading of it.
module l3m_cell
  import l3m_pkg::*;
#(
  parameter int unsigned NL = 4   // number of layers, at least 2
) (
  input  logic        clk,
  input  cell_cmd_t   cmd,
  input  logic        sel,
  input  logic        ei,
  input  logic        wi,
  input  logic        ni,
  input  logic        si,
  input  logic [1:0]  pf,
  input  logic        pfv,
  input  logic        ntop,     // low while the top layer is processed
  output logic        xo,
  output logic [2:0]  status
);

  cell_state_t st0;
  cell_state_t ns;
  cell_state_t sr [NL-1];   // sr[0] = bottom stage (next layer), sr[NL-2] = top stage
  logic        li_q;
  logic        hi;

  assign hi = is_expanded(sr[0]) && ntop;

  l3m_sequencer u_seq (
    .ps(st0), .cmd(cmd), .sel(sel),
    .ei(ei), .wi(wi), .ni(ni), .si(si),
    .hi(hi), .li(li_q), .pf(pf),
    .ns(ns), .xo(xo), .status(status)
  );

  always_ff @(posedge clk) begin
    if (pfv) begin
      st0 <= sr[0];
      for (int i = 0; i < int'(NL) - 2; i++) sr[i] <= sr[i+1];
      sr[NL-2] <= ns;
      li_q <= is_expanded(st0) && ntop;
    end else begin
      st0 <= ns;
    end
  end

endmodule
