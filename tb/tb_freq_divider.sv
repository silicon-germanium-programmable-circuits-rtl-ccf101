// tb_freq_divider: counts input clock edges and checks that each output
// toggles exactly every 2**(n-1) input cycles for its division ratio n
// (default taps /2, /4, /8, /32), starting low after reset.
`timescale 1ps / 1fs
module tb_freq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] div;
  localparam int unsigned RATIO [4] = '{2, 4, 8, 32};
  int unsigned cyc = 0;

  freq_divider dut (.clk(clk), .rst_n(rst_n), .div(div));

  always #50 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (div !== 4'b0000) begin failures++; $display("FAIL after reset div %b", div); end
    // cyc counts rising edges since reset; expected level of output k after
    // cyc edges is bit (cyc / (RATIO[k]/2)) & 1.
    repeat (256) begin
      @(posedge clk); cyc++;
      #1;
      for (int k = 0; k < 4; k++) begin
        logic e;
        e = ((cyc / (RATIO[k] / 2)) % 2) == 1;
        checks++;
        if (div[k] !== e) begin failures++; $display("FAIL cyc %0d div[%0d]=%b exp %b", cyc, k, div[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
