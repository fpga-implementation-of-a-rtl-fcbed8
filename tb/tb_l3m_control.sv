// tb_l3m_control: the control unit (8 x 8 x 4, PFV-assisted backtrace)
// against a scripted stand-in for the cell array.
//
// The stand-in drives the STATUS bus: during EXPAND it pulls bit 1 low for a
// set number of cycles and bit 0 low once the target layer is selected after
// a set number of cycles; during TRACE it returns a scripted sequence of
// direction codes and checks that each trace hits the expected cell (column,
// row and, through the testbench's own layer count, layer). This reaches
// cases the real array cannot produce, such as a backtrace that runs into an
// empty cell (TFAIL). Checked: reply bytes, corner reporting, XFAIL after
// NL+1 quiet cycles, the backtrace cycle counts (1 cycle per horizontal or
// upward step with PFV low on horizontal hits, NL-1 per downward step), the
// cycle counters, the cleanup and SET phases, SELECT + CLEAR on a region,
// and the debug TRACE reply.
`timescale 1ns/1ps
module tb_l3m_control;
  import l3m_pkg::*;

  localparam int NL = 4;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ready, tx_valid, tx_ready;
  logic [1:0] pf_in [NL];
  logic [1:0] pf;
  cell_cmd_t  cmd;
  logic       pfv, ntop, lsel;
  logic [2:0] ca1, ca2, ra1, ra2;
  logic [2:0] status;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  l3m_control #(.NX(8), .NY(8), .NL(NL)) dut (
    .clk(clk), .rst(rst), .rx_data(rx_data), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready), .pf_in(pf_in),
    .cmd(cmd), .pf(pf), .pfv(pfv), .ntop(ntop), .lsel(lsel),
    .col_a1(ca1), .col_a2(ca2), .row_a1(ra1), .row_a2(ra2), .status(status));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- stand-in array ----
  int cur_m = 0;                 // layer the array would be processing
  int s1_low_cycles, reach_after, ecount;
  int sx [$], sy [$], sz [$];
  logic [2:0] scode [$];
  int n_exp_cyc, n_clear_nosel, n_set_hit, n_hbypass, n_clear_sel, n_clear_lsel;

  always_comb begin
    status = 3'b111;
    if (cmd == CMD_EXPAND) begin
      status[1] = !(ecount < s1_low_cycles);
      status[0] = !(lsel && ecount >= reach_after);
    end else if (cmd == CMD_TRACE && lsel && scode.size() > 0) begin
      status = scode[0];
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      cur_m <= 0;
    end else begin
      check(ntop == (cur_m != NL - 1), "/TOP follows the layer count");
      if (cmd == CMD_EXPAND) begin
        check(pf == pf_in[cur_m], "PF carries the preference of the layer being processed");
        ecount <= ecount + 1;
        n_exp_cyc <= n_exp_cyc + 1;
      end
      if (cmd == CMD_CLEAR && !lsel) n_clear_nosel <= n_clear_nosel + 1;
      if (cmd == CMD_CLEAR && lsel)  n_clear_lsel  <= n_clear_lsel + 1;
      if (cmd == CMD_SET && lsel) begin
        n_set_hit <= n_set_hit + 1;
        check(ca1 == 3'(sx[$]) && ca2 == ca1 && ra1 == 3'(sy[$]) && ra2 == ra1 && cur_m == sz[$],
              "SET selects the source cell on its layer");
      end
      if (cmd == CMD_TRACE && lsel && sx.size() > 0) begin
        check(ca1 == 3'(sx[0]) && ca2 == ca1 && ra1 == 3'(sy[0]) && ra2 == ra1 && cur_m == sz[0],
              $sformatf("TRACE hits (%0d,%0d,%0d), got (%0d,%0d,%0d)", sx[0], sy[0], sz[0], ca1, ra1, cur_m));
        if (scode[0] inside {3'd2, 3'd3, 3'd4, 3'd5} && !(sx[0] == sx[$] && sy[0] == sy[$] && sz[0] == sz[$])) begin
          check(!pfv, "PFV low on a horizontal backtrace hit");
          n_hbypass <= n_hbypass + 1;
        end
        void'(sx.pop_front()); void'(sy.pop_front()); void'(sz.pop_front()); void'(scode.pop_front());
      end
      if (pfv) cur_m <= (cur_m + 1) % NL;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host side ----
  task automatic send(input logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_valid = 1'b1;
    while (!rx_ready) @(negedge clk);
    @(posedge clk);
    #1 rx_valid = 1'b0;
  endtask

  task automatic recv(output logic [7:0] b);
    forever begin
      @(negedge clk);
      if (tx_valid && tx_ready) begin
        b = tx_data;
        @(posedge clk);
        break;
      end
    end
  endtask

  task automatic expect_bytes(string tag, logic [7:0] e [$]);
    logic [7:0] b;
    foreach (e[i]) begin
      recv(b);
      check(b == e[i], $sformatf("%s: byte %0d is %02h, expected %02h", tag, i, b, e[i]));
    end
  endtask

  task automatic get16(logic [7:0] op, output int v);
    logic [7:0] h, l;
    send(op); recv(h); recv(l);
    v = {h, l};
  endtask

  // path: list of traced cells target..source with their codes
  task automatic route(string tag, int p [6], int s1c, int reach, int path [$][3],
                       logic [2:0] codes [$], logic [7:0] reply [$], int exp_t);
    int xc, tc, e0, c0;
    s1_low_cycles = s1c; reach_after = reach; ecount = 0;
    sx = {}; sy = {}; sz = {}; scode = {};
    foreach (path[i]) begin
      sx.push_back(path[i][0]); sy.push_back(path[i][1]); sz.push_back(path[i][2]);
      scode.push_back(codes[i]);
    end
    e0 = n_exp_cyc; c0 = n_clear_nosel;
    send(OP_ROUTE);
    // source coordinates are also the SET target; keep them at the tail
    sx.push_back(p[0]); sy.push_back(p[1]); sz.push_back(p[2]); scode.push_back(3'd0);
    for (int i = 0; i < 6; i++) send(8'(p[i]));
    expect_bytes(tag, reply);
    get16(OP_GET_XCOUNT, xc);
    get16(OP_GET_TCOUNT, tc);
    check(xc == n_exp_cyc - e0, $sformatf("%s: xcount %0d, EXPAND cycles %0d", tag, xc, n_exp_cyc - e0));
    check(n_clear_nosel - c0 == NL, $sformatf("%s: cleanup lasted %0d cycles", tag, n_clear_nosel - c0));
    if (exp_t >= 0) check(tc == exp_t, $sformatf("%s: tcount %0d, expected %0d", tag, tc, exp_t));
  endtask

  initial begin
    logic [7:0] b;
    rst = 1'b1; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b1; pf_in = '{2'b11, 2'b10, 2'b01, 2'b11};
    n_exp_cyc = 0; n_clear_nosel = 0; n_set_hit = 0; n_hbypass = 0; n_clear_lsel = 0;
    s1_low_cycles = 0; reach_after = 0; ecount = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // west twice, then up to the source: corner at (1,2,1)
    route("route A", '{1,2,2, 3,2,1}, 6, 6,
          '{'{3,2,1}, '{2,2,1}, '{1,2,1}, '{1,2,2}},
          '{3'(ST_XE), 3'(ST_XE), 3'(ST_XU), 3'(ST_XE)},
          '{8'd3,8'd2,8'd1, 8'd1,8'd2,8'd1, 8'd1,8'd2,8'd2, RC_SUCCESS},
          NL + 1 + 1 + 1);
    check(n_set_hit == 1, "SET applied once to the source");
    check(n_hbypass == 2, "two PFV-bypassed horizontal hits");
    // two steps down, no corner
    route("route B", '{5,5,0, 5,5,2}, 3, 3,
          '{'{5,5,2}, '{5,5,1}, '{5,5,0}},
          '{3'(ST_XD), 3'(ST_XD), 3'(ST_XE)},
          '{8'd5,8'd5,8'd2, 8'd5,8'd5,8'd0, RC_SUCCESS},
          NL + 2 * (NL - 1));
    // north/south steps: XN steps south (y+1), XS north (y-1)
    route("route C", '{2,6,3, 2,4,3}, 2, 2,
          '{'{2,4,3}, '{2,5,3}, '{2,6,3}},
          '{3'(ST_XN), 3'(ST_XN), 3'(ST_XE)},
          '{8'd2,8'd4,8'd3, 8'd2,8'd6,8'd3, RC_SUCCESS},
          NL + 2);
    // backtrace runs into an empty cell
    route("route TFAIL", '{0,0,0, 2,0,0}, 2, 2,
          '{'{2,0,0}, '{1,0,0}},
          '{3'(ST_XE), 3'(ST_E)},
          '{8'd2,8'd0,8'd0, RC_TFAIL}, -1);
    // nothing ever expands
    begin
      int xc;
      route("route XFAIL", '{0,0,0, 7,7,3}, 0, 1000, '{}, '{}, '{RC_XFAIL}, -1);
      get16(OP_GET_XCOUNT, xc);
      check(xc == NL + 1, $sformatf("XFAIL after %0d quiet cycles, expected %0d", xc, NL + 1));
    end

    // SELECT a region and CLEAR it: one rotation, layers 1..3 selected
    n_clear_lsel = 0;
    send(OP_SELECT);
    send(8'd1); send(8'd1); send(8'd1); send(8'd3); send(8'd2); send(8'd3);
    send(OP_CLEAR);
    @(negedge clk);
    check(cmd == CMD_CLEAR && ca1 == 1 && ca2 == 3 && ra1 == 1 && ra2 == 2,
          "CLEAR drives the selected region");
    repeat (2 * NL) @(posedge clk);
    check(n_clear_lsel == 3, $sformatf("region CLEAR selected %0d layer cycles, expected 3", n_clear_lsel));

    // CLEARX: one rotation of CLEAR with nothing selected
    n_clear_lsel = 0;
    begin
      int c0;
      c0 = n_clear_nosel;
      send(OP_CLEARX);
      repeat (2 * NL) @(posedge clk);
      check(n_clear_nosel - c0 == NL && n_clear_lsel == 0, "CLEARX is one unselected CLEAR rotation");
    end

    // debug TRACE returns the cell code
    send(OP_SELECT);
    send(8'd6); send(8'd1); send(8'd2); send(8'd6); send(8'd1); send(8'd2);
    sx = {6}; sy = {1}; sz = {2}; scode = {3'(ST_XS)};
    send(OP_TRACE);
    recv(b);
    check(b == 8'(ST_XS), $sformatf("debug TRACE replies the code, got %02h", b));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
