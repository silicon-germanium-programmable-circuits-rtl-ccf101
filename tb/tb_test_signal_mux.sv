// tb_test_signal_mux: random check of the 4-bit external/test signal MUX.
`timescale 1ps / 1fs
module tb_test_signal_mux;
  int checks = 0, failures = 0;
  logic [3:0] a, b, y;
  logic       sel;

  test_signal_mux #(.W(4)) dut (.ext_sig(a), .test_sig(b), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      a = 4'($urandom); b = 4'($urandom); sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin failures++; $display("FAIL a %h b %h sel %b y %h", a, b, sel, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
