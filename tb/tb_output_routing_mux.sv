// tb_output_routing_mux: exhaustive check of the 4:1 redirection MUX over all
// codes and input patterns: codes 1..4 pass d[0..3], all others give 0.
`timescale 1ps / 1fs
module tb_output_routing_mux;
  int checks = 0, failures = 0;
  logic [2:0] code;
  logic [3:0] d;
  logic       y;

  output_routing_mux dut (.code(code), .d(d), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++)
      for (int v = 0; v < 16; v++) begin
        logic e;
        code = 3'(k);
        d    = 4'(v);
        #1;
        e = (k >= 1 && k <= 4) ? d[k-1] : 1'b0;
        checks++;
        if (y !== e) begin failures++; $display("FAIL code %0d d %b y %b", k, d, y); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
