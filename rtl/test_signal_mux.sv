// test_signal_mux: W-bit 2:1 MUX in front of a core input bus.
//
// The chip has two of these, for Signal A and Signal B. Each passes either
// the external W-bit input (sel = 0) or the frequency divider's test signals
// (sel = 1) into the FPGA core. Combinational; the select pin and its
// polarity are this design's choice.
`timescale 1ps / 1fs
module test_signal_mux #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] ext_sig,
  input  logic [W-1:0] test_sig,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? test_sig : ext_sig;
endmodule
