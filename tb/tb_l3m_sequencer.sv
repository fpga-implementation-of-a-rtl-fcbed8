// tb_l3m_sequencer: exhaustive check of the cell sequencer against the
// reference rules: every present state, command, select, neighbour input
// combination and preference setting (16384 cases), comparing NS, XO and the
// STATUS drive.
`timescale 1ns/1ps
module tb_l3m_sequencer;
  import l3m_pkg::*;
  import tb_l3m_ref_pkg::*;

  cell_state_t ps, ns;
  cell_cmd_t   cmd;
  logic        sel, ei, wi, ni, si, hi, li, xo;
  logic [1:0]  pf;
  logic [2:0]  status;
  int checks = 0, failures = 0;

  l3m_sequencer dut (.ps(ps), .cmd(cmd), .sel(sel), .ei(ei), .wi(wi), .ni(ni),
                     .si(si), .hi(hi), .li(li), .pf(pf), .ns(ns), .xo(xo),
                     .status(status));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ens, est;
    for (int v = 0; v < 16384; v++) begin
      ps  = cell_state_t'(v[2:0]);
      cmd = cell_cmd_t'(v[4:3]);
      {sel, ei, wi, ni, si, hi, li} = v[11:5];
      pf  = v[13:12];
      #1;
      ref_step(v[2:0], v[4:3], sel, ei, wi, ni, si, hi, li, pf, ens, est);
      checks++;
      if (ns != ens || status != est || xo != ref_isx(v[2:0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL: ps=%0d cmd=%0d in=%b pf=%b: ns=%0d/%0d st=%b/%b xo=%b",
                   v[2:0], v[4:3], v[11:5], pf, ns, ens, status, est, xo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
