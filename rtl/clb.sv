// clb: configurable logic block of the SiGe basic cell.
//
// The three input routing MUX outputs F1, F2, F3 (each optionally inverted,
// a free rail swap in differential logic) drive a 2:1 MUX: C = F3 ? F2 : F1.
// C is the cell's combinational output. The D-flip-flop has the 2:1 choice
// of its own input built into its master latch, which has two independent
// current trees: with On1 it loads C on the rising clock edge, with On2 it
// loads its own Q (holds). On1 wins if both are set. With neither set the
// flip-flop's trees are off and Q is 0. Clear resets Q asynchronously.
//
// The MUX, its select by F3, the master-latch selection between C and Q and
// the clear follow the published cell; the polarity control, which F3 value
// picks F2, the clear polarity and the behaviour with both trees off are this
// design's choices.
//
// Timing: C is combinational from f1..f3; Q changes on the rising edge of clk.
`timescale 1ps / 1fs
module clb (
  input  logic       clk,
  input  logic       clear,   // active high, asynchronous
  input  logic       f1,
  input  logic       f2,
  input  logic       f3,
  input  logic [2:0] inv,     // inv[0] F1, inv[1] F2, inv[2] F3
  input  logic       on1,
  input  logic       on2,
  output logic       c,
  output logic       q
);
  logic y1, y2, y3;
  logic ff_on;
  logic q_r;

  assign y1 = f1 ^ inv[0];
  assign y2 = f2 ^ inv[1];
  assign y3 = f3 ^ inv[2];
  assign c  = y3 ? y2 : y1;

  assign ff_on = on1 | on2;

  always_ff @(posedge clk or posedge clear) begin
    if (clear)    q_r <= 1'b0;
    else if (on1) q_r <= c;
    else if (on2) q_r <= q_r;
    else          q_r <= 1'b0;
  end

  assign q = ff_on & q_r;
endmodule
