// tb_l3m_layer_sel: layer counter and layer-range flags, NL = 4 and NL = 3,
// under a random enable (PFV) and random ranges, against a counter model.
`timescale 1ns/1ps
module tb_l3m_layer_sel;
  logic       clk = 1'b0;
  logic       clr, en, same_pt;
  logic [1:0] z1, z2;
  logic [1:0] cur4, cur3;
  logic       ntop4, rs4, rl4, ir4, ntop3, rs3, rl3, ir3;
  int checks = 0, failures = 0;
  int m4, m3;

  always #5 clk = ~clk;

  l3m_layer_sel #(.NL(4)) dut4 (.clk(clk), .clr(clr), .en(en), .same_pt(same_pt),
    .z1(z1), .z2(z2), .cur_layer(cur4), .ntop(ntop4), .range_start(rs4),
    .range_last(rl4), .in_range(ir4));
  l3m_layer_sel #(.NL(3)) dut3 (.clk(clk), .clr(clr), .en(en), .same_pt(same_pt),
    .z1(z1), .z2(z2), .cur_layer(cur3), .ntop(ntop3), .range_start(rs3),
    .range_last(rl3), .in_range(ir3));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; en = 1'b0; same_pt = 1'b0; z1 = '0; z2 = '0;
    m4 = 0; m3 = 0;
    @(posedge clk); #1 clr = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      int lo, hi, zb;
      en = 1'($urandom_range(0, 3) != 0);
      same_pt = 1'($urandom_range(0, 1));
      z1 = 2'($urandom_range(0, 3));
      z2 = 2'($urandom_range(0, 3));
      #1;
      zb = same_pt ? z1 : z2;
      lo = (z1 < zb) ? z1 : zb;
      hi = (z1 < zb) ? zb : z1;
      chk(cur4 == 2'(m4) && cur3 == 2'(m3), $sformatf("counter %0d/%0d model %0d/%0d", cur4, cur3, m4, m3));
      chk(ntop4 == (m4 != 3) && ntop3 == (m3 != 2), "ntop");
      chk(rs4 == (m4 == lo) && rl4 == (m4 == hi) && ir4 == (m4 >= lo && m4 <= hi), "range flags NL=4");
      chk(rs3 == (m3 == lo) && rl3 == (m3 == hi) && ir3 == (m3 >= lo && m3 <= hi), "range flags NL=3");
      @(posedge clk);
      if (en) begin m4 = (m4 + 1) % 4; m3 = (m3 + 1) % 3; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
