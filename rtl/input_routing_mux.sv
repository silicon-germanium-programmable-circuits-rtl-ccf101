// input_routing_mux: 17:1 (F1, F2) or 16:1 (F3) input routing MUX of the basic cell.
//
// Two levels, as in the published schematic: four 4:1 MUXes, one per
// neighbour direction (E, E4, Ce, Qe / W, W4, Cw, Qw / S, S4, Cs, Qs /
// N, N4, Cn, Qn), feed a 5:1 MUX whose fifth input is the cell's own Q
// (HAS_Q = 1, the 17:1 form). With HAS_Q = 0 the last level is a 4:1 MUX and
// the block is the 16:1 form. Each MUX level is a one-hot AND-OR of its
// inputs, gated by the enables from mux_decoder, so only the 4:1 MUX of the
// selected direction and the last level are "on"; an unused tree is off.
// A MUX that is switched off (code 0 or an unused code) outputs 0.
//
// Combinational. Code numbering (1..16 neighbours, 17 Q) is this design's own.
`timescale 1ps / 1fs
module input_routing_mux
  import sige_fpga_pkg::*;
#(
  parameter bit HAS_Q = 1'b1
) (
  input  logic [IN_SEL_W-1:0] code,
  input  nbr_t                in_e,
  input  nbr_t                in_w,
  input  nbr_t                in_s,
  input  nbr_t                in_n,
  input  logic                q,
  output logic                y
);
  localparam int unsigned N_IN = HAS_Q ? 17 : 16;

  logic [N_IN-1:0] en;
  logic            tree_on;
  logic [3:0]      grp_d   [IN_GROUPS];
  logic [3:0]      grp_on;          // second-level enables of the 4:1 MUXes
  logic [3:0]      grp_y;           // 4:1 MUX outputs
  logic            q_en;

  mux_decoder #(.N_IN(N_IN), .CODE_W(IN_SEL_W)) u_dec (
    .code (code),
    .en   (en),
    .on   (tree_on)
  );

  // Signal order inside a group: X, X4, C, Q (bit 0 = X).
  assign grp_d[GRP_E] = {in_e.q, in_e.c, in_e.x4, in_e.x};
  assign grp_d[GRP_W] = {in_w.q, in_w.c, in_w.x4, in_w.x};
  assign grp_d[GRP_S] = {in_s.q, in_s.c, in_s.x4, in_s.x};
  assign grp_d[GRP_N] = {in_n.q, in_n.c, in_n.x4, in_n.x};

  always_comb begin
    for (int unsigned g = 0; g < IN_GROUPS; g++) begin
      grp_on[g] = |en[g*IN_PER_GRP +: IN_PER_GRP];
      grp_y[g]  = |(en[g*IN_PER_GRP +: IN_PER_GRP] & grp_d[g]);
    end
  end

  if (HAS_Q) begin : g_q
    assign q_en = en[N_IN-1];
  end else begin : g_noq
    assign q_en = 1'b0;
  end

  // Last level (5:1 or 4:1): one-hot over the group outputs and Q.
  assign y = tree_on & (|(grp_on & grp_y) | (q_en & (HAS_Q ? q : 1'b0)));

endmodule
