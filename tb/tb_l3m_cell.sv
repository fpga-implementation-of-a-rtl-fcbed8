// tb_l3m_cell: one multilayer cell (NL = 4) against a layer-by-layer model.
//
// The model keeps the state of every layer, the layer being processed and
// the registered "layer below is expanded" flag. Each cycle the testbench
// applies a random command, select, neighbour inputs, preferences and PFV,
// derives /TOP from its own layer count, and compares XO and the STATUS
// drive with the model. A rotation of CLEAR with the cell selected first
// gives every layer a known state.
`timescale 1ns/1ps
module tb_l3m_cell;
  import l3m_pkg::*;
  import tb_l3m_ref_pkg::*;

  localparam int NL = 4;
  logic       clk = 1'b0;
  cell_cmd_t  cmd;
  logic       sel, ei, wi, ni, si, pfv, ntop, xo;
  logic [1:0] pf;
  logic [2:0] status;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_hold = 0;

  logic [2:0] mst [NL];
  int         cur;
  bit         li_m;

  always #5 clk = ~clk;

  l3m_cell #(.NL(NL)) dut (.clk(clk), .cmd(cmd), .sel(sel), .ei(ei), .wi(wi),
    .ni(ni), .si(si), .pf(pf), .pfv(pfv), .ntop(ntop), .xo(xo), .status(status));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ns, st;
    bit hi_m;
    cur = 0;
    cmd = CMD_CLEAR; sel = 1'b1; pfv = 1'b1; pf = 2'b11;
    {ei, wi, ni, si} = '0;
    for (int i = 0; i < NL; i++) begin
      ntop = (cur != NL - 1);
      @(posedge clk); #1;
      cur = (cur + 1) % NL;
    end
    foreach (mst[i]) mst[i] = 3'd0;
    li_m = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      cmd = (r < 70) ? CMD_EXPAND : (r < 80) ? CMD_SET : (r < 90) ? CMD_TRACE : CMD_CLEAR;
      sel = 1'($urandom_range(0, 3) == 0);
      {ei, wi, ni, si} = 4'($urandom_range(0, 15) & $urandom_range(0, 15) & $urandom_range(0, 15));
      pf = 2'($urandom_range(0, 3));
      pfv = 1'($urandom_range(0, 4) != 0);
      ntop = (cur != NL - 1);
      hi_m = (cur != NL - 1) && ref_isx(mst[(cur + 1) % NL]);
      #1;
      ref_step(mst[cur], cmd, sel, ei, wi, ni, si, hi_m, li_m, pf, ns, st);
      checks++;
      if (xo != ref_isx(mst[cur]) || status != st) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cycle %0d layer %0d: xo=%b status=%b, model %0d/%b", i, cur, xo, status, mst[cur], st);
      end
      if (ns == 3'd6 && mst[cur] == 3'd0) n_up++;
      if (ns == 3'd7 && mst[cur] == 3'd0) n_dn++;
      if (!pfv) n_hold++;
      @(posedge clk); #1;
      if (pfv) begin
        li_m = ref_isx(mst[cur]) && (cur != NL - 1);
        mst[cur] = ns;
        cur = (cur + 1) % NL;
      end else begin
        mst[cur] = ns;
      end
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: coverage up=%0d down=%0d hold=%0d", n_up, n_dn, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
