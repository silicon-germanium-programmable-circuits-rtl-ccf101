// tb_mux_decoder: exhaustive check of the routing-MUX configuration decoder.
// Every 5-bit code is applied to the 17-input decoder and every 3-bit code to
// the 4-input one; the expected enables are one-hot at position code-1 for
// codes 1..N and all zero (tree off) otherwise.
`timescale 1ps / 1fs
module tb_mux_decoder;
  int checks = 0, failures = 0;
  logic [4:0]  code17;
  logic [16:0] en17;
  logic        on17;
  logic [2:0]  code4;
  logic [3:0]  en4;
  logic        on4;

  mux_decoder #(.N_IN(17), .CODE_W(5)) dut17 (.code(code17), .en(en17), .on(on17));
  mux_decoder #(.N_IN(4),  .CODE_W(3)) dut4  (.code(code4),  .en(en4),  .on(on4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      logic [16:0] exp_en;
      code17 = 5'(k);
      #1;
      exp_en = (k >= 1 && k <= 17) ? (17'd1 << (k - 1)) : 17'd0;
      checks++;
      if (en17 !== exp_en || on17 !== (k >= 1 && k <= 17)) begin
        failures++;
        $display("FAIL 17:1 code %0d en %b exp %b on %b", k, en17, exp_en, on17);
      end
    end
    for (int k = 0; k < 8; k++) begin
      logic [3:0] exp_en;
      code4 = 3'(k);
      #1;
      exp_en = (k >= 1 && k <= 4) ? (4'd1 << (k - 1)) : 4'd0;
      checks++;
      if (en4 !== exp_en || on4 !== (k >= 1 && k <= 4)) begin
        failures++;
        $display("FAIL 4:1 code %0d en %b exp %b", k, en4, exp_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
