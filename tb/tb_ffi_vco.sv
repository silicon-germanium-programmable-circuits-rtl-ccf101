// tb_ffi_vco: measures the oscillator model's period at several control
// voltages and compares it with the linear tuning law
// f = 8 GHz + 5.7 GHz * (v - 0.7 V) / 0.5 V, clamped to 8..13.7 GHz; checks
// that out_n is the complement of out_p and that the output stops when en
// is low.
`timescale 1ps / 1fs
module tb_ffi_vco;
  int checks = 0, failures = 0;
  logic en = 0;
  real  vctrl = 0.7;
  logic out_p, out_n;

  ffi_vco dut (.en(en), .vctrl(vctrl), .out_p(out_p), .out_n(out_n));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f_exp(real v);
    real vc;
    vc = (v < 0.7) ? 0.7 : ((v > 1.2) ? 1.2 : v);
    return 8.0 + 5.7 * (vc - 0.7) / 0.5;
  endfunction

  initial begin
    real vs [6] = '{0.6, 0.7, 0.85, 1.0, 1.2, 1.3};
    #100;
    checks++;
    if (out_p !== 1'b0) begin failures++; $display("FAIL running while disabled"); end
    en = 1'b1;
    foreach (vs[i]) begin
      realtime t0, per, exp_per;
      vctrl = vs[i];
      repeat (3) @(posedge out_p);        // let the new period settle
      t0 = $realtime;
      repeat (10) @(posedge out_p);
      per = ($realtime - t0) / 10.0;
      exp_per = 1000.0 / f_exp(vs[i]);
      checks++;
      if (per < exp_per * 0.995 || per > exp_per * 1.005) begin
        failures++; $display("FAIL v=%0f period %0f ps expected %0f", vs[i], per, exp_per);
      end
      #1;
      checks++;
      if (out_n !== ~out_p) begin failures++; $display("FAIL out_n not complementary"); end
    end
    en = 1'b0;
    #200;
    begin
      logic held;
      held = out_p;
      #500;
      checks++;
      if (out_p !== held || out_p !== 1'b0) begin failures++; $display("FAIL did not stop"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
