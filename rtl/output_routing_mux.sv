// output_routing_mux: 4:1 redirection MUX of the basic cell's output routing block.
//
// One of these drives each of the cell's four redirection outputs (Nout,
// Eout, Sout, Wout). Its inputs are the redirected signals arriving from the
// three other directions and a feed-through of one of the cell's input
// routing MUXes (d[3]). Code 0 switches the MUX's current tree off and the
// output is 0; codes 1..4 select d[0..3]; codes 5..7 are also off.
//
// Combinational. The code numbering is this design's choice.
`timescale 1ps / 1fs
module output_routing_mux
  import sige_fpga_pkg::*;
(
  input  logic [OUT_SEL_W-1:0] code,
  input  logic [3:0]           d,
  output logic                 y
);
  logic [3:0] en;
  logic       on;

  mux_decoder #(.N_IN(4), .CODE_W(OUT_SEL_W)) u_dec (
    .code (code),
    .en   (en),
    .on   (on)
  );

  assign y = on & |(en & d);
endmodule
