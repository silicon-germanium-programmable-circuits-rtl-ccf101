// mux_decoder: configuration decoder of a CML routing MUX.
//
// The routing MUXes are built as trees of small emitter-coupled MUXes whose
// input pairs each sit on an N-FET switch. This decoder turns the stored
// configuration code into the one-hot switch enables: code 0 switches the
// whole tree off (all enables low, the tree's reference current is cut) and
// code k (1..N_IN) enables input k-1. Codes above N_IN also switch the tree off.
// The flat one-hot vector is split by the MUX into its per-level enables
// (for the 17:1 MUX: 4 per 4:1 MUX and 5 for the 5:1 MUX, 21 lines).
//
// Purely combinational. The decode rule and code width are this design's choice;
// the decoder itself and its role follow the published MUX structure.
`timescale 1ps / 1fs
module mux_decoder #(
  parameter int unsigned N_IN  = 17,
  parameter int unsigned CODE_W = 5
) (
  input  logic [CODE_W-1:0] code,
  output logic [N_IN-1:0]   en,
  output logic              on    // tree powered
);
  always_comb begin
    en = '0;
    for (int unsigned k = 0; k < N_IN; k++)
      en[k] = (code == CODE_W'(k + 1));
  end
  assign on = |en;
endmodule
