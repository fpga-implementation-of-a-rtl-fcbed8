// tb_l3m_ref_pkg: reference model of the L3M cell rules for the testbenches.
//
// ref_step returns, for one cell and one cycle, the next state and the
// 3-bit active-low status drive, written directly from the cell command
// table: CLEAR (selected -> E, unselected expanded -> E), SET (selected ->
// XE), TRACE (selected -> BL, drives its code), EXPAND (empty cell takes the
// first of EI, WI, NI, SI gated by the preference bits, then HI, LI).
package tb_l3m_ref_pkg;
  import l3m_pkg::*;

  function automatic bit ref_isx(logic [2:0] s);
    return s >= 3'd2;
  endfunction

  function automatic void ref_step(
      input  logic [2:0] ps, input logic [1:0] cmd, input bit sel,
      input  bit ei, input bit wi, input bit ni, input bit si,
      input  bit hi, input bit li, input logic [1:0] pf,
      output logic [2:0] ns, output logic [2:0] st);
    ns = ps;
    st = 3'b111;
    case (cmd)
      2'd0: if (sel || ref_isx(ps)) ns = 3'd0;
      2'd1: if (sel) ns = 3'd2;
      2'd3: if (sel) begin ns = 3'd1; st = ps; end
      default: begin
        if (ps == 3'd0) begin
          if (ei && pf[1])      ns = 3'd2;
          else if (wi && pf[1]) ns = 3'd3;
          else if (ni && pf[0]) ns = 3'd4;
          else if (si && pf[0]) ns = 3'd5;
          else if (hi)          ns = 3'd6;
          else if (li)          ns = 3'd7;
          if (ns != 3'd0) st = {2'b10, !sel};
        end else if (ref_isx(ps)) begin
          st = {2'b11, !sel};
        end
      end
    endcase
  endfunction
endpackage
