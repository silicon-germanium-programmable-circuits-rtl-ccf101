// clock_select: chooses the FPGA core clock.
//
// sel = 0 passes the external clock pin, sel = 1 the on-chip oscillator. A
// plain combinational MUX: sel must only change while the core is idle (it
// is a set-up pin, not a run-time switch). Pin and polarity are this
// design's choice.
`timescale 1ps / 1fs
module clock_select (
  input  logic ext_clk,
  input  logic osc_clk,
  input  logic sel,
  output logic clk
);
  assign clk = sel ? osc_clk : ext_clk;
endmodule
