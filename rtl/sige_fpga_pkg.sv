// sige_fpga_pkg: types and constants shared by the SiGe FPGA basic cell, its
// programming circuit and the array.
//
// A basic cell (BC) receives from each of its four neighbours a bundle of four
// signals (nbr_t): the neighbour's redirection output towards this cell (X),
// the length-4 signal from the 4x4 block in that direction (X4), and the
// neighbour's combinational (C) and sequential (Q) outputs. Within a direction
// the order X, X4, C, Q is the order in which the input routing MUX numbers
// them.
//
// The configuration word of a cell (bc_cfg_t, 32 bits) is this design's own
// layout. Every selection field uses code 0 for "tree switched off", so an
// all-zero word is a cell with every current tree off, which is what the
// programming circuit drives until its read enable is set.
`timescale 1ps / 1fs
package sige_fpga_pkg;

  // Input routing MUX codes (5 bits): 0 off, 1..16 the neighbour signals in
  // the order E,E4,Ce,Qe, W,W4,Cw,Qw, S,S4,Cs,Qs, N,N4,Cn,Qn, 17 the cell's own Q.
  localparam int unsigned IN_SEL_W   = 5;
  localparam int unsigned IN_GROUPS  = 4;   // E, W, S, N
  localparam int unsigned IN_PER_GRP = 4;   // X, X4, C, Q

  // Output redirection MUX codes (3 bits): 0 off, 1..3 the three other
  // directions in the order printed for each MUX, 4 the feed-through.
  localparam int unsigned OUT_SEL_W = 3;

  localparam int unsigned GRP_E = 0, GRP_W = 1, GRP_S = 2, GRP_N = 3;

  typedef struct packed {
    logic x;    // redirected signal (E, W, S or N)
    logic x4;   // length-4 signal from the 4x4 block (E4, W4, S4, N4)
    logic c;    // neighbour's combinational output (Cx)
    logic q;    // neighbour's sequential output (Qx)
  } nbr_t;

  typedef struct packed {
    logic [IN_SEL_W-1:0]  f1_sel;   // 17:1 input MUX F1
    logic [IN_SEL_W-1:0]  f2_sel;   // 17:1 input MUX F2
    logic [IN_SEL_W-1:0]  f3_sel;   // 16:1 input MUX F3
    logic [2:0]           inv;      // polarity of F3, F2, F1 (bit 2..0)
    logic                 on1;      // D-FF master tree 1: load C
    logic                 on2;      // D-FF master tree 2: hold Q
    logic [OUT_SEL_W-1:0] nout_sel; // E, W, S, F3
    logic [OUT_SEL_W-1:0] eout_sel; // N, S, W, F2
    logic [OUT_SEL_W-1:0] sout_sel; // E, W, N, F3
    logic [OUT_SEL_W-1:0] wout_sel; // N, S, E, F1
  } bc_cfg_t;

  localparam int unsigned BC_CFG_W = $bits(bc_cfg_t);

endpackage
