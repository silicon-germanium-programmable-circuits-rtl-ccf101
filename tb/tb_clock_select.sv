// tb_clock_select: drives two clocks of different periods and checks that the
// output follows the selected one at every sample point.
`timescale 1ps / 1fs
module tb_clock_select;
  int checks = 0, failures = 0;
  logic ext_clk = 0, osc_clk = 0, sel = 0, clk;

  clock_select dut (.ext_clk(ext_clk), .osc_clk(osc_clk), .sel(sel), .clk(clk));

  always #50 osc_clk = ~osc_clk;
  always #170 ext_clk = ~ext_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5;
    for (int i = 0; i < 400; i++) begin
      if (i % 100 == 0) sel = ~sel;
      #7;
      checks++;
      if (clk !== (sel ? osc_clk : ext_clk)) begin failures++; $display("FAIL sel %b clk %b", sel, clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
