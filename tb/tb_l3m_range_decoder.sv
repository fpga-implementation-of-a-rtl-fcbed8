// tb_l3m_range_decoder: exhaustive check of the range decoder for N = 8 and
// a non-power-of-two N = 6 (every pair of addresses, enable on and off).
`timescale 1ns/1ps
module tb_l3m_range_decoder;
  logic       en;
  logic [2:0] a1, a2;
  logic [7:0] sel8;
  logic [5:0] sel6;
  int checks = 0, failures = 0;

  l3m_range_decoder #(.N(8)) dut8 (.en(en), .a1(a1), .a2(a2), .sel(sel8));
  l3m_range_decoder #(.N(6)) dut6 (.en(en), .a1(a1), .a2(a2), .sel(sel6));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          logic [7:0] exp8;
          en = e[0]; a1 = 3'(i); a2 = 3'(j);
          #1;
          exp8 = '0;
          for (int k = 0; k < 8; k++)
            if (e != 0 && ((k >= i && k <= j) || (k >= j && k <= i))) exp8[k] = 1'b1;
          checks += 2;
          if (sel8 != exp8) begin failures++; $display("FAIL: N=8 en=%0d %0d..%0d: %b", e, i, j, sel8); end
          if (sel6 != exp8[5:0]) begin failures++; $display("FAIL: N=6 en=%0d %0d..%0d: %b", e, i, j, sel6); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
