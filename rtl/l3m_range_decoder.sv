// l3m_range_decoder: row or column decoder of the L3M array.
//
// Asserts sel[i] for every index i between the two addresses a1 and a2
// (inclusive, in either order) while en is high, so the control unit can
// pick a single row/column (a1 == a2) or a band of them. Purely
// combinational. The published design gives the decoder's job (single cells or
// rectangular regions); the comparator form is this design's choice.
module l3m_range_decoder #(
  parameter int unsigned N = 8,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         en,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  output logic [N-1:0] sel
);

  logic [W-1:0] lo, hi;

  always_comb begin
    lo = (a1 <= a2) ? a1 : a2;
    hi = (a1 <= a2) ? a2 : a1;
    for (int i = 0; i < int'(N); i++)
      sel[i] = en && (W'(i) >= lo) && (W'(i) <= hi);
  end

endmodule
