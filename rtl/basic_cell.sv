// basic_cell: the SiGe FPGA basic cell (BC), an XC6200-style cell.
//
// Three stages:
//  * Input routing: F1 and F2 are 17:1 MUXes over the 16 neighbour signals
//    (E, E4, Ce, Qe, W..., S..., N...) and the cell's own Q; F3 is the 16:1
//    form without Q.
//  * CLB: C = F3 ? F2 : F1 (with optional input inversion) and a D-FF that
//    either loads C (On1) or holds (On2); Q is the D-FF output.
//  * Output routing: C and Q go to all four neighbours directly. Four 4:1
//    redirection MUXes pass signals on: Nout from E, W, S; Eout from N, S, W;
//    Sout from E, W, N; Wout from N, S, E; the fourth input of each is a
//    feed-through of an input MUX (Wout: F1, Eout: F2, Nout and Sout: F3).
//
// Every MUX and the D-FF can be switched off by its configuration field, which
// is how the cell's power-saving cases (logic only, logic with 1..4
// redirections, redirection only, cell off) are selected. The feed-through
// assignment of Eout, Nout and Sout is this design's choice; the Wout one and
// the other routing follow the published cell.
//
// Timing: all outputs but Q are combinational from the inputs and cfg; Q
// changes on the rising edge of clk (or on clear). Inside an array the
// combinational paths from neighbour inputs to the redirection outputs close
// structural loops through neighbouring cells (a linter reports them as
// circular logic); they are inherent to the routing fabric and only become
// real loops if a configuration selects one.
`timescale 1ps / 1fs
module basic_cell
  import sige_fpga_pkg::*;
(
  input  logic    clk,
  input  logic    clear,
  input  bc_cfg_t cfg,
  input  nbr_t    in_e,
  input  nbr_t    in_w,
  input  nbr_t    in_s,
  input  nbr_t    in_n,
  output logic    c,
  output logic    q,
  output logic    nout,
  output logic    eout,
  output logic    sout,
  output logic    wout
);
  logic f1, f2, f3;

  input_routing_mux #(.HAS_Q(1'b1)) u_f1 (
    .code(cfg.f1_sel), .in_e(in_e), .in_w(in_w), .in_s(in_s), .in_n(in_n), .q(q), .y(f1));
  input_routing_mux #(.HAS_Q(1'b1)) u_f2 (
    .code(cfg.f2_sel), .in_e(in_e), .in_w(in_w), .in_s(in_s), .in_n(in_n), .q(q), .y(f2));
  input_routing_mux #(.HAS_Q(1'b0)) u_f3 (
    .code(cfg.f3_sel), .in_e(in_e), .in_w(in_w), .in_s(in_s), .in_n(in_n), .q(1'b0), .y(f3));

  clb u_clb (
    .clk(clk), .clear(clear), .f1(f1), .f2(f2), .f3(f3), .inv(cfg.inv),
    .on1(cfg.on1), .on2(cfg.on2), .c(c), .q(q));

  output_routing_mux u_nout (.code(cfg.nout_sel), .d({f3, in_s.x, in_w.x, in_e.x}), .y(nout));
  output_routing_mux u_eout (.code(cfg.eout_sel), .d({f2, in_w.x, in_s.x, in_n.x}), .y(eout));
  output_routing_mux u_sout (.code(cfg.sout_sel), .d({f3, in_n.x, in_w.x, in_e.x}), .y(sout));
  output_routing_mux u_wout (.code(cfg.wout_sel), .d({f1, in_e.x, in_s.x, in_n.x}), .y(wout));
endmodule
