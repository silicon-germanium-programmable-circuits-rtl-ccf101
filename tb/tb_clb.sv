// tb_clb: random test of the configurable logic block.
// Each cycle the inputs, polarity bits, master-tree enables and clear are
// randomised; C is checked against C = (F3^i3) ? (F2^i2) : (F1^i1) and Q
// against a cycle model of the D-FF (load C with On1, hold with On2, 0 when
// both trees are off, asynchronous clear). The cycle count of a load (one
// rising edge from D to Q) is checked by the same model.
`timescale 1ps / 1fs
module tb_clb;
  int checks = 0, failures = 0;
  logic clk = 0, clear = 1;
  logic f1, f2, f3, on1, on2;
  logic [2:0] inv;
  logic c, q;
  logic q_mem, q_exp, c_exp;
  int n_load = 0, n_hold = 0, n_off = 0;

  clb dut (.clk(clk), .clear(clear), .f1(f1), .f2(f2), .f3(f3), .inv(inv),
           .on1(on1), .on2(on2), .c(c), .q(q));

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_c(logic a, logic b, logic s, logic [2:0] iv);
    logic ya, yb, ys;
    ya = a ^ iv[0]; yb = b ^ iv[1]; ys = s ^ iv[2];
    if (ys) return yb;
    return ya;
  endfunction

  initial begin
    {f1, f2, f3, on1, on2, inv} = '0;
    q_mem = 1'b0;
    #20;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL clear"); end
    @(negedge clk); clear = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      {f1, f2, f3} = 3'($urandom);
      inv = 3'($urandom);
      on1 = 1'($urandom);
      on2 = 1'($urandom);
      #1;
      c_exp = ref_c(f1, f2, f3, inv);
      checks++;
      if (c !== c_exp) begin failures++; $display("FAIL c f=%b%b%b inv=%b c=%b", f3, f2, f1, inv, c); end
      @(posedge clk);
      if (on1)      begin q_mem = c_exp; n_load++; end
      else if (on2) begin n_hold++; end
      else          begin q_mem = 1'b0; n_off++; end
      q_exp = (on1 | on2) & q_mem;
      #1;
      checks++;
      if (q !== q_exp) begin failures++; $display("FAIL q on1=%b on2=%b q=%b exp=%b", on1, on2, q, q_exp); end
      if (i % 97 == 50) begin
        // asynchronous clear between edges
        #10 clear = 1;
        #1;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL async clear"); end
        clear = 0;
        q_mem = 1'b0;
      end
    end
    checks++;
    if (n_load == 0 || n_hold == 0 || n_off == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
