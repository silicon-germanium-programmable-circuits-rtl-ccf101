// tb_input_routing_mux: checks the 17:1 and 16:1 input routing MUXes.
// For every code and many random input patterns the output is compared with
// a table lookup: codes 1..16 pick E,E4,Ce,Qe,W,W4,Cw,Qw,S,S4,Cs,Qs,N,N4,Cn,Qn,
// code 17 picks Q on the 17:1 MUX only, every other code gives 0 (tree off).
`timescale 1ps / 1fs
module tb_input_routing_mux;
  import sige_fpga_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] code;
  nbr_t in_e, in_w, in_s, in_n;
  logic q;
  logic y17, y16;

  input_routing_mux #(.HAS_Q(1'b1)) dut17 (.code(code), .in_e(in_e), .in_w(in_w), .in_s(in_s), .in_n(in_n), .q(q), .y(y17));
  input_routing_mux #(.HAS_Q(1'b0)) dut16 (.code(code), .in_e(in_e), .in_w(in_w), .in_s(in_s), .in_n(in_n), .q(q), .y(y16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      logic [16:0] v;   // v[k-1] = signal selected by code k
      v = 17'($urandom);
      if (trial == 0) v = 17'h1FFFF;
      // listed in the order the codes number them
      in_e = '{x: v[0],  x4: v[1],  c: v[2],  q: v[3]};
      in_w = '{x: v[4],  x4: v[5],  c: v[6],  q: v[7]};
      in_s = '{x: v[8],  x4: v[9],  c: v[10], q: v[11]};
      in_n = '{x: v[12], x4: v[13], c: v[14], q: v[15]};
      q    = v[16];
      for (int k = 0; k < 32; k++) begin
        logic e17, e16;
        code = 5'(k);
        #1;
        e17 = (k >= 1 && k <= 17) ? v[k-1] : 1'b0;
        e16 = (k >= 1 && k <= 16) ? v[k-1] : 1'b0;
        checks += 2;
        if (y17 !== e17) begin failures++; $display("FAIL 17:1 code %0d v %h y %b", k, v, y17); end
        if (y16 !== e16) begin failures++; $display("FAIL 16:1 code %0d v %h y %b", k, v, y16); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
