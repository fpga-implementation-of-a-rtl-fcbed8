// tb_l3m_array: a 5 x 4 x 3 array against a cycle-by-cycle model of the
// whole grid. Random commands with random row/column ranges and layer
// selection are applied, with expansion bursts started from SET points;
// every cycle the STATUS bus and the state register of every cell (the
// layer being processed) are compared with the model, which applies the
// cell rules to all nodes of the current layer at once with the neighbour
// wiring and edge ties of the array.
`timescale 1ns/1ps
module tb_l3m_array;
  import l3m_pkg::*;
  import tb_l3m_ref_pkg::*;

  localparam int NX = 5, NY = 4, NL = 3;
  logic       clk = 1'b0;
  cell_cmd_t  cmd;
  logic [1:0] pf;
  logic       pfv, ntop, lsel;
  logic [2:0] ca1, ca2;
  logic [1:0] ra1, ra2;
  logic [2:0] status;
  int checks = 0, failures = 0;
  int n_exp = 0, n_trace = 0;

  logic [2:0] m   [NL][NY][NX];
  bit         lim [NY][NX];
  logic [2:0] hw  [NY][NX];
  int         cur;

  always #5 clk = ~clk;

  l3m_array #(.NX(NX), .NY(NY), .NL(NL)) dut (.clk(clk), .cmd(cmd), .pf(pf),
    .pfv(pfv), .ntop(ntop), .lsel(lsel), .col_a1(ca1), .col_a2(ca2),
    .row_a1(ra1), .row_a2(ra2), .status(status));

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      assign hw[y][x] = dut.g_row[y].g_col[x].u_cell.st0;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit mx(int x, int y, int z);
    if (x < 0 || x >= NX || y < 0 || y >= NY) return 1'b0;
    return ref_isx(m[z][y][x]);
  endfunction

  initial begin
    logic [2:0] ns [NY][NX];
    logic [2:0] st, exp_status;
    cur = 0;
    cmd = CMD_CLEAR; lsel = 1'b1; pfv = 1'b1; pf = 2'b11;
    ca1 = 0; ca2 = NX - 1; ra1 = 0; ra2 = NY - 1;
    for (int i = 0; i < NL; i++) begin
      ntop = (cur != NL - 1);
      @(posedge clk); #1;
      cur = (cur + 1) % NL;
    end
    foreach (m[z, y, x]) m[z][y][x] = 3'd0;
    foreach (lim[y, x]) lim[y][x] = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      cmd = (r < 75) ? CMD_EXPAND : (r < 82) ? CMD_SET : (r < 92) ? CMD_TRACE : CMD_CLEAR;
      ca1 = 3'($urandom_range(0, NX - 1));
      ca2 = (cmd == CMD_CLEAR) ? 3'($urandom_range(0, NX - 1)) : ca1;
      ra1 = 2'($urandom_range(0, NY - 1));
      ra2 = (cmd == CMD_CLEAR) ? 2'($urandom_range(0, NY - 1)) : ra1;
      lsel = 1'($urandom_range(0, 3) != 0);
      pf = ($urandom_range(0, 3) == 0) ? 2'($urandom_range(0, 3)) : 2'b11;
      pfv = 1'($urandom_range(0, 5) != 0);
      ntop = (cur != NL - 1);
      #1;
      exp_status = 3'b111;
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          bit s;
          s = lsel && ((x >= ca1 && x <= ca2) || (x >= ca2 && x <= ca1))
                   && ((y >= ra1 && y <= ra2) || (y >= ra2 && y <= ra1));
          ref_step(m[cur][y][x], cmd, s, mx(x - 1, y, cur), mx(x + 1, y, cur),
                   mx(x, y + 1, cur), mx(x, y - 1, cur),
                   (cur != NL - 1) && ref_isx(m[(cur + 1) % NL][y][x]), lim[y][x],
                   pf, ns[y][x], st);
          exp_status &= st;
          checks++;
          if (hw[y][x] != m[cur][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL: cycle %0d cell %0d,%0d layer %0d: %0d model %0d",
                                        i, x, y, cur, hw[y][x], m[cur][y][x]);
          end
          if (cmd == CMD_EXPAND && m[cur][y][x] == 3'd0 && ns[y][x] != 3'd0) n_exp++;
        end
      checks++;
      if (status != exp_status) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d status %b model %b", i, status, exp_status);
      end
      if (cmd == CMD_TRACE && lsel) n_trace++;
      @(posedge clk); #1;
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          if (pfv) lim[y][x] = ref_isx(m[cur][y][x]) && (cur != NL - 1);
          m[cur][y][x] = ns[y][x];
        end
      if (pfv) cur = (cur + 1) % NL;
    end
    checks++;
    if (n_exp < 100 || n_trace == 0) begin
      failures++;
      $display("FAIL: coverage expansions=%0d traces=%0d", n_exp, n_trace);
    end
    $display("expansions=%0d traces=%0d", n_exp, n_trace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
