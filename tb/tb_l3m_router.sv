// tb_l3m_router: end-to-end test of the L3M router at its default size
// (8 x 8 x 4, PFV-assisted backtrace), acting as the host.
//
// A reference model in the testbench keeps the obstacle map and finds
// shortest-path lengths by breadth-first search over the 6-connected grid.
// Each ROUTE reply (endpoint triples, then a reply code) is checked: success
// exactly when the model finds a path; endpoints start at the target and end
// at the source; segments are axis-aligned, turn at every endpoint, run over
// free nodes, and add up to the model's shortest distance. The backtrace
// cycle count read with GET_TCOUNT must equal
//   NL + H*(1 or NL) + U + D*(NL-1)
// for H horizontal, U upward and D downward steps, and the expansion count
// must lie within the bounds the one-layer-per-cycle sweep allows.
// The run routes the ten source/target pairs of the prototype's evaluation
// on an empty grid, then exercises the debug commands (TRACE, SET, EXPAND,
// CLEARX), an enclosed target (expansion failure), per-layer preferential
// expansion (the model then allows only the enabled in-layer moves),
// region rip-up with SELECT+CLEAR, and random routes. The host side applies
// random back-pressure on the reply stream.
`timescale 1ns/1ps
module tb_l3m_router;
  import l3m_pkg::*;

  localparam int NX = 8, NY = 8, NL = 4;
  localparam bit VP = 1'b1;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] rx_data;
  logic       rx_valid;
  logic       rx_ready;
  logic [7:0] tx_data;
  logic       tx_valid;
  logic       tx_ready;
  logic [1:0] pf_in [NL];

  always #5 clk = ~clk;

  l3m_router dut (
    .clk(clk), .rst(rst),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .pf_in(pf_in)
  );

  int checks = 0, failures = 0;
  int n_success = 0, n_xfail = 0, n_corner = 0, n_up = 0, n_down = 0, n_horiz = 0;
  int n_bypass = 0, n_ripup = 0, n_clearx = 0, n_dbg_trace = 0, n_dbg_expand = 0;
  int n_pref = 0, n_counts = 0;
  int tot_x = 0, tot_t = 0;
  bit busy_random = 1'b1;   // random back-pressure on tx_ready

  bit obst [NL][NY][NX];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count cycles in which the array processes a layer twice for the backtrace
  always @(posedge clk)
    if (!rst && dut.cmd == CMD_TRACE && !dut.pfv) n_bypass++;

  // random ready on the reply side
  always @(posedge clk) tx_ready <= busy_random ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired in state %0d at %0d,%0d,%0d", dut.u_ctrl.state, dut.u_ctrl.x1, dut.u_ctrl.y1, dut.u_ctrl.z1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Handshake signals are sampled on the falling edge, where they are
  // stable; the byte moves on the following rising edge.
  task automatic send(input logic [7:0] b);
    @(negedge clk);
    rx_data  = b;
    rx_valid = 1'b1;
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

  // shortest distance, -1 if unreachable; moves within layer z obey pf_in[z]
  function automatic int bfs(int sx, int sy, int sz, int tx, int ty, int tz);
    int dmap [NL][NY][NX];
    int q [$];
    foreach (dmap[z, y, x]) dmap[z][y][x] = -1;
    if (obst[tz][ty][tx]) return -1;
    dmap[sz][sy][sx] = 0;
    q.push_back((sz * NY + sy) * NX + sx);
    while (q.size() > 0) begin
      int c, x, y, z;
      c = q.pop_front();
      x = c % NX; y = (c / NX) % NY; z = c / (NX * NY);
      for (int k = 0; k < 6; k++) begin
        int nx, ny, nz;
        nx = x; ny = y; nz = z;
        case (k)
          0: nx = x + 1;
          1: nx = x - 1;
          2: ny = y + 1;
          3: ny = y - 1;
          4: nz = z + 1;
          default: nz = z - 1;
        endcase
        if (!pf_in[z][1] && (k == 0 || k == 1)) continue;
        if (!pf_in[z][0] && (k == 2 || k == 3)) continue;
        if (nx < 0 || nx >= NX || ny < 0 || ny >= NY || nz < 0 || nz >= NL) continue;
        if (obst[nz][ny][nx] || dmap[nz][ny][nx] >= 0) continue;
        dmap[nz][ny][nx] = dmap[z][y][x] + 1;
        q.push_back((nz * NY + ny) * NX + nx);
      end
    end
    return dmap[tz][ty][tx];
  endfunction

  task automatic get_count(input logic [7:0] op, output int v);
    logic [7:0] hi, lo;
    send(op);
    recv(hi);
    recv(lo);
    v = {hi, lo};
    n_counts++;
  endtask

  task automatic route(int sx, int sy, int sz, int tx, int ty, int tz);
    int d, xc, tc, npts, h, u, dn, len, exp_tc;
    int px [$], py [$], pz [$];
    logic [7:0] b, by, bz;
    string tag;
    tag = $sformatf("route (%0d,%0d,%0d)->(%0d,%0d,%0d)", sx, sy, sz, tx, ty, tz);
    d = bfs(sx, sy, sz, tx, ty, tz);
    if (pf_in != '{default: 2'b11}) n_pref++;
    send(OP_ROUTE);
    send(8'(sx)); send(8'(sy)); send(8'(sz));
    send(8'(tx)); send(8'(ty)); send(8'(tz));
    forever begin
      recv(b);
      if (b >= 8'hF0) break;
      recv(by); recv(bz);
      px.push_back(b); py.push_back(by); pz.push_back(bz);
    end
    get_count(OP_GET_XCOUNT, xc);
    get_count(OP_GET_TCOUNT, tc);
    tot_x += xc;
    if (d < 0) begin
      check(b == RC_XFAIL, {tag, ": expected XFAIL"});
      check(px.size() == 0, {tag, ": no endpoints on failure"});
      n_xfail++;
      return;
    end
    check(b == RC_SUCCESS, $sformatf("%s: expected SUCCESS, got %02h", tag, b));
    if (b != RC_SUCCESS) return;
    n_success++;
    tot_t += tc;
    npts = px.size();
    check(npts >= 2, {tag, ": at least two endpoints"});
    if (npts < 2) return;
    check(px[0] == tx && py[0] == ty && pz[0] == tz, {tag, ": first endpoint is the target"});
    check(px[npts-1] == sx && py[npts-1] == sy && pz[npts-1] == sz, {tag, ": last endpoint is the source"});
    if (npts > 2) n_corner++;
    h = 0; u = 0; dn = 0; len = 0;
    // walk the segments, mark the wire, count step kinds
    begin
      int cx, cy, cz, lastdir;
      cx = px[0]; cy = py[0]; cz = pz[0];
      check(!obst[cz][cy][cx], {tag, ": target was free"});
      obst[cz][cy][cx] = 1'b1;
      lastdir = -1;
      for (int i = 1; i < npts; i++) begin
        int ddx, ddy, ddz, nax, dir, n;
        ddx = px[i] - px[i-1]; ddy = py[i] - py[i-1]; ddz = pz[i] - pz[i-1];
        nax = (ddx != 0) + (ddy != 0) + (ddz != 0);
        if (npts == 2 && nax == 0) continue;   // source == target
        check(nax == 1, $sformatf("%s: segment %0d axis-aligned", tag, i));
        if (nax != 1) return;
        dir = (ddx > 0) ? 0 : (ddx < 0) ? 1 : (ddy > 0) ? 2 : (ddy < 0) ? 3 : (ddz > 0) ? 4 : 5;
        check(dir != lastdir, $sformatf("%s: endpoint %0d is a real corner", tag, i - 1));
        lastdir = dir;
        n = (ddx != 0) ? ((ddx > 0) ? ddx : -ddx) : (ddy != 0) ? ((ddy > 0) ? ddy : -ddy)
                                                                : ((ddz > 0) ? ddz : -ddz);
        for (int s = 0; s < n; s++) begin
          cx += (ddx > 0) - (ddx < 0);
          cy += (ddy > 0) - (ddy < 0);
          cz += (ddz > 0) - (ddz < 0);
          if (!(cx == sx && cy == sy && cz == sz))
            check(!obst[cz][cy][cx], $sformatf("%s: node (%0d,%0d,%0d) was free", tag, cx, cy, cz));
          obst[cz][cy][cx] = 1'b1;
        end
        len += n;
        if (ddz > 0) u += n; else if (ddz < 0) dn += n; else h += n;
      end
    end
    check(len == d, $sformatf("%s: path length %0d, shortest %0d", tag, len, d));
    if (pf_in != '{default: 2'b11}) begin
      for (int i = 1; i < npts; i++) begin
        if (px[i] != px[i-1]) check(pf_in[pz[i]][1], {tag, ": east-west segment only on a layer that allows it"});
        if (py[i] != py[i-1]) check(pf_in[pz[i]][0], {tag, ": north-south segment only on a layer that allows it"});
      end
    end
    n_up += u; n_down += dn; n_horiz += h;
    exp_tc = NL + h * (VP ? 1 : NL) + u + dn * (NL - 1);
    check(tc == exp_tc, $sformatf("%s: backtrace %0d cycles, expected %0d", tag, tc, exp_tc));
    check(xc >= ((d > 0) ? (d - 1) * (NL - 1) + 1 : 1) && xc <= d * (NL + 1) + NL,
          $sformatf("%s: expansion %0d cycles for distance %0d", tag, xc, d));
  endtask

  task automatic select_region(int x1, int y1, int z1, int x2, int y2, int z2);
    send(OP_SELECT);
    send(8'(x1)); send(8'(y1)); send(8'(z1));
    send(8'(x2)); send(8'(y2)); send(8'(z2));
  endtask

  task automatic clear_region(int x1, int y1, int z1, int x2, int y2, int z2);
    select_region(x1, y1, z1, x2, y2, z2);
    send(OP_CLEAR);
    for (int z = z1; z <= z2; z++)
      for (int y = y1; y <= y2; y++)
        for (int x = x1; x <= x2; x++) obst[z][y][x] = 1'b0;
    n_ripup++;
  endtask

  // TRACE one point: returns the cell's state code, leaves it blocked
  task automatic trace_point(int x, int y, int z, output logic [7:0] c);
    select_region(x, y, z, x, y, z);
    send(OP_TRACE);
    recv(c);
    obst[z][y][x] = 1'b1;
    n_dbg_trace++;
  endtask

  task automatic wait_idle();
    repeat (2 * NL + 2) @(posedge clk);
  endtask

  // ten pairs of the prototype evaluation: {sx,sy,sz,tx,ty,tz}
  int pairs [10][6] = '{
    '{1,3,0, 1,6,3}, '{7,5,0, 0,4,0}, '{2,4,3, 3,2,0}, '{6,4,3, 6,0,0},
    '{4,1,2, 2,2,2}, '{2,1,1, 4,4,2}, '{2,3,3, 7,2,2}, '{3,0,3, 7,3,3},
    '{3,0,1, 2,1,3}, '{0,0,2, 0,6,2}};

  initial begin
    logic [7:0] c;
    rst = 1'b1; rx_valid = 1'b0; rx_data = '0; pf_in = '{default: 2'b11};
    foreach (obst[z, y, x]) obst[z][y][x] = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;

    // 1. the ten evaluation routes on an empty grid
    for (int i = 0; i < 10; i++)
      route(pairs[i][0], pairs[i][1], pairs[i][2], pairs[i][3], pairs[i][4], pairs[i][5]);
    $display("evaluation routes: expansion %0d cycles, backtrace %0d cycles, cleanup %0d cycles",
             tot_x, tot_t, 10 * NL);

    // 2. TRACE on a free cell reads E and blocks it; a second TRACE reads BL
    trace_point(5, 7, 0, c);
    check(c == 8'(ST_E), "debug TRACE of a free cell reads E");
    trace_point(5, 7, 0, c);
    check(c == 8'(ST_BL), "debug TRACE of a traced cell reads BL");
    trace_point(6, 0, 0, c);
    check(c == 8'(ST_BL), "debug TRACE of a routed cell reads BL");

    // 3. SET a point, EXPAND for one rotation, its neighbours are labelled
    select_region(5, 6, 1, 5, 6, 1);
    send(OP_SET);
    select_region(0, 0, 0, NX - 1, NY - 1, NL - 1);
    send(OP_EXPAND);
    n_dbg_expand++;
    wait_idle();
    trace_point(6, 6, 1, c);
    check(c == 8'(ST_XE), $sformatf("east neighbour of SET cell reads XE, got %0d", c));
    trace_point(4, 6, 1, c);
    check(c == 8'(ST_XW), $sformatf("west neighbour of SET cell reads XW, got %0d", c));
    trace_point(5, 5, 1, c);
    check(c == 8'(ST_XN), $sformatf("north neighbour of SET cell reads XN, got %0d", c));
    // 4. CLEARX removes labels but keeps obstacles
    send(OP_CLEARX);
    n_clearx++;
    wait_idle();
    trace_point(5, 7, 1, c);
    check(c == 8'(ST_E), $sformatf("after CLEARX a labelled cell reads E, got %0d", c));
    trace_point(5, 6, 1, c);
    check(c == 8'(ST_E), $sformatf("after CLEARX the SET cell reads E, got %0d", c));
    trace_point(6, 6, 1, c);
    check(c == 8'(ST_BL), "CLEARX keeps blocked cells");

    // 5. enclosed target: expansion fails
    clear_region(0, 0, 0, NX - 1, NY - 1, NL - 1);
    wait_idle();
    trace_point(3, 3, 0, c); trace_point(5, 3, 0, c); trace_point(4, 2, 0, c);
    trace_point(4, 4, 0, c); trace_point(4, 3, 1, c);
    route(0, 0, 0, 4, 3, 0);
    route(0, 0, 3, 7, 7, 0);

    // 6. preferences: first east-west only on every layer, then
    //    alternating east-west / north-south layers
    clear_region(0, 0, 0, NX - 1, NY - 1, NL - 1);
    pf_in = '{default: 2'b10};
    route(0, 2, 0, 7, 2, 3);
    route(1, 5, 2, 6, 3, 2);
    clear_region(0, 0, 0, NX - 1, NY - 1, NL - 1);
    pf_in = '{2'b10, 2'b01, 2'b10, 2'b01};
    route(0, 0, 0, 7, 7, 0);
    route(7, 0, 1, 0, 6, 2);
    route(2, 2, 3, 5, 6, 3);
    pf_in = '{default: 2'b11};

    // 7. random routes with partial rip-up between them
    clear_region(0, 0, 0, NX - 1, NY - 1, NL - 1);
    for (int i = 0; i < 60; i++) begin
      int s [3], t [3];
      do begin
        s = '{$urandom_range(0, NX - 1), $urandom_range(0, NY - 1), $urandom_range(0, NL - 1)};
      end while (obst[s[2]][s[1]][s[0]]);
      do begin
        t = '{$urandom_range(0, NX - 1), $urandom_range(0, NY - 1), $urandom_range(0, NL - 1)};
      end while (obst[t[2]][t[1]][t[0]]);
      route(s[0], s[1], s[2], t[0], t[1], t[2]);
      if (i % 15 == 14) begin
        int a, b2;
        a = $urandom_range(0, NX - 3); b2 = $urandom_range(0, NY - 3);
        clear_region(a, b2, 0, a + 2, b2 + 2, NL - 1);
      end
    end

    // every mechanism must have happened
    check(n_success > 0, "a route succeeded");
    check(n_xfail > 0, "an expansion failed");
    check(n_corner > 0, "a route reported a corner");
    check(n_up > 0, "a backtrace stepped up");
    check(n_down > 0, "a backtrace stepped down");
    check(n_horiz > 0, "a backtrace stepped horizontally");
    check(n_bypass > 0, "PFV bypassed the shift register during backtrace");
    check(n_ripup > 0, "a region was cleared");
    check(n_clearx > 0, "CLEARX was applied");
    check(n_dbg_trace > 0 && n_dbg_expand > 0, "debug TRACE/SET/EXPAND applied");
    check(n_pref >= 5, "preferential expansion used");
    check(n_counts > 0, "cycle counters read");
    $display("routes ok=%0d xfail=%0d corners=%0d steps up=%0d down=%0d horiz=%0d bypass=%0d ripup=%0d",
             n_success, n_xfail, n_corner, n_up, n_down, n_horiz, n_bypass, n_ripup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
