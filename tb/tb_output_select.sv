// tb_output_select: exhaustive check of the two 4:1 output pad MUXes.
`timescale 1ps / 1fs
module tb_output_select;
  int checks = 0, failures = 0;
  logic [3:0] core_out, prog_out;
  logic [1:0] core_sel, prog_sel;
  logic       fpga_pad, prog_pad;

  output_select dut (.core_out(core_out), .core_sel(core_sel), .prog_out(prog_out),
                     .prog_sel(prog_sel), .fpga_pad(fpga_pad), .prog_pad(prog_pad));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int s = 0; s < 4; s++) begin
        core_out = 4'(v); prog_out = ~4'(v); core_sel = 2'(s); prog_sel = 2'(3 - s);
        #1;
        checks += 2;
        if (fpga_pad !== ((v >> s) & 1)) begin failures++; $display("FAIL core v %h s %0d", v, s); end
        if (prog_pad !== (((~v) >> (3 - s)) & 1)) begin failures++; $display("FAIL prog v %h s %0d", v, s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
