// tb_basic_cell: random test of the whole basic cell against a reference
// model written from the cell's description.
// Each cycle a random configuration and random neighbour inputs are applied.
// The model picks F1/F2 from the 17 candidates (16 neighbour signals in the
// order E,E4,Ce,Qe,W..,S..,N.. and the cell's own Q), F3 from the first 16,
// forms C = F3' ? F2' : F1' with the polarity bits, updates Q on the clock
// edge (load C, hold or off) and forms the four redirection outputs from
// their printed inputs plus the feed-through (Nout: E,W,S,F3; Eout: N,S,W,F2;
// Sout: E,W,N,F3; Wout: N,S,E,F1). It counts how often each power-saving case
// occurs (logic only, logic with redirections, redirection only, cell off).
`timescale 1ps / 1fs
module tb_basic_cell;
  import sige_fpga_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clear = 1;
  bc_cfg_t cfg;
  nbr_t in_e, in_w, in_s, in_n;
  logic c, q, nout, eout, sout, wout;
  logic q_mem;
  int n_logic_only = 0, n_logic_redir = 0, n_redir_only = 0, n_off = 0;

  basic_cell dut (.clk(clk), .clear(clear), .cfg(cfg), .in_e(in_e), .in_w(in_w),
    .in_s(in_s), .in_n(in_n), .c(c), .q(q), .nout(nout), .eout(eout), .sout(sout), .wout(wout));

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pick(logic [16:0] v, int code, int n);
    if (code >= 1 && code <= n) return v[code - 1];
    return 1'b0;
  endfunction

  function automatic logic pick4(logic [3:0] d, int code);
    if (code >= 1 && code <= 4) return d[code - 1];
    return 1'b0;
  endfunction

  logic [16:0] v;
  logic f1, f2, f3, y1, y2, y3, c_exp, q_exp;
  logic n_exp, e_exp, s_exp, w_exp;
  bit ff_on;

  task automatic check_comb();
    v = {q, in_n.q, in_n.c, in_n.x4, in_n.x, in_s.q, in_s.c, in_s.x4, in_s.x,
         in_w.q, in_w.c, in_w.x4, in_w.x, in_e.q, in_e.c, in_e.x4, in_e.x};
    f1 = pick(v, int'(cfg.f1_sel), 17);
    f2 = pick(v, int'(cfg.f2_sel), 17);
    f3 = pick(v, int'(cfg.f3_sel), 16);
    y1 = f1 ^ cfg.inv[0]; y2 = f2 ^ cfg.inv[1]; y3 = f3 ^ cfg.inv[2];
    c_exp = y3 ? y2 : y1;
    n_exp = pick4({f3, in_s.x, in_w.x, in_e.x}, int'(cfg.nout_sel));
    e_exp = pick4({f2, in_w.x, in_s.x, in_n.x}, int'(cfg.eout_sel));
    s_exp = pick4({f3, in_n.x, in_w.x, in_e.x}, int'(cfg.sout_sel));
    w_exp = pick4({f1, in_e.x, in_s.x, in_n.x}, int'(cfg.wout_sel));
    checks += 5;
    if (c !== c_exp)    begin failures++; $display("FAIL c cfg=%h", cfg); end
    if (nout !== n_exp) begin failures++; $display("FAIL nout cfg=%h", cfg); end
    if (eout !== e_exp) begin failures++; $display("FAIL eout cfg=%h", cfg); end
    if (sout !== s_exp) begin failures++; $display("FAIL sout cfg=%h", cfg); end
    if (wout !== w_exp) begin failures++; $display("FAIL wout cfg=%h", cfg); end
  endtask

  initial begin
    cfg = '0; in_e = '0; in_w = '0; in_s = '0; in_n = '0;
    q_mem = 1'b0;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      cfg = bc_cfg_t'($urandom);
      // bias the codes towards valid selections
      cfg.f1_sel = 5'($urandom_range(0, 18));
      cfg.f2_sel = 5'($urandom_range(0, 18));
      cfg.f3_sel = 5'($urandom_range(0, 17));
      if (i % 50 == 7) cfg = '0;                                   // cell shut down
      if (i % 50 == 19) cfg = '{f1_sel: 5'd0, f2_sel: 5'd0, f3_sel: 5'd0, inv: 3'd0,
                                on1: 1'b0, on2: 1'b0, nout_sel: 3'd1, eout_sel: 3'd2,
                                sout_sel: 3'd0, wout_sel: 3'd3};   // redirection only
      {in_e, in_w, in_s, in_n} = 16'($urandom);
      #1;
      check_comb();
      begin
        bit logic_on, redir_on;
        logic_on = (cfg.f1_sel != 0) || (cfg.f2_sel != 0) || (cfg.f3_sel != 0) || cfg.on1 || cfg.on2;
        redir_on = (cfg.nout_sel inside {[1:4]}) || (cfg.eout_sel inside {[1:4]}) ||
                   (cfg.sout_sel inside {[1:4]}) || (cfg.wout_sel inside {[1:4]});
        if (logic_on && !redir_on) n_logic_only++;
        if (logic_on && redir_on)  n_logic_redir++;
        if (!logic_on && redir_on) n_redir_only++;
        if (!logic_on && !redir_on) n_off++;
      end
      @(posedge clk);
      ff_on = cfg.on1 | cfg.on2;
      if (cfg.on1)       q_mem = c_exp;
      else if (!cfg.on2) q_mem = 1'b0;
      q_exp = ff_on & q_mem;
      #1;
      checks++;
      if (q !== q_exp) begin failures++; $display("FAIL q cfg=%h q=%b exp=%b", cfg, q, q_exp); end
      // Q feeds back into F1/F2: recheck the combinational outputs after the edge
      check_comb();
    end
    $display("cases: logic only %0d, logic+redirection %0d, redirection only %0d, off %0d",
             n_logic_only, n_logic_redir, n_redir_only, n_off);
    checks++;
    if (n_logic_only == 0 || n_logic_redir == 0 || n_redir_only == 0 || n_off == 0) begin
      failures++; $display("FAIL case coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
