// l3m_layer_sel: layer counter and layer selection logic of the control unit.
//
// The counter tracks which layer the cells are processing: it counts
// 0..NL-1 and wraps, advancing on every clock with en (PFV) high and holding
// while PFV is low, exactly as the cells' shift registers do. ntop is low
// while the top layer NL-1 is processed. Given the layer range z1..z2 (or z1
// alone when same_pt is high), it flags the first layer of the range
// (range_start), the last (range_last) and any layer inside it (in_range),
// all combinationally from the counter. clr returns the counter to layer 0
// synchronously. Range comparison in either order is this design's choice.
module l3m_layer_sel #(
  parameter int unsigned NL = 4,
  parameter int unsigned ZW = (NL > 1) ? $clog2(NL) : 1
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          en,
  input  logic          same_pt,
  input  logic [ZW-1:0] z1,
  input  logic [ZW-1:0] z2,
  output logic [ZW-1:0] cur_layer,
  output logic          ntop,
  output logic          range_start,
  output logic          range_last,
  output logic          in_range
);

  logic [ZW-1:0] zb, lo, hi;

  always_ff @(posedge clk) begin
    if (clr)
      cur_layer <= '0;
    else if (en)
      cur_layer <= (cur_layer == ZW'(NL - 1)) ? '0 : cur_layer + 1'b1;
  end

  always_comb begin
    zb          = same_pt ? z1 : z2;
    lo          = (z1 <= zb) ? z1 : zb;
    hi          = (z1 <= zb) ? zb : z1;
    ntop        = (cur_layer != ZW'(NL - 1));
    range_start = (cur_layer == lo);
    range_last  = (cur_layer == hi);
    in_range    = (cur_layer >= lo) && (cur_layer <= hi);
  end

endmodule
