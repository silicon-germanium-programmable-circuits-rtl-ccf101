// output_select: the chip's output select block.
//
// Two 4:1 MUXes bring the core's four outputs and the programming circuit's
// four outputs to one output pad each, chosen by a 2-bit select per pad.
// Combinational. The 4:1 form and the selects are this design's reading of
// the block diagram, which shows two 4-bit buses entering two MUXes.
`timescale 1ps / 1fs
module output_select (
  input  logic [3:0] core_out,
  input  logic [1:0] core_sel,
  input  logic [3:0] prog_out,
  input  logic [1:0] prog_sel,
  output logic       fpga_pad,
  output logic       prog_pad
);
  assign fpga_pad = core_out[core_sel];
  assign prog_pad = prog_out[prog_sel];
endmodule
