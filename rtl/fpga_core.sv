// fpga_core: ROWS x COLS array of basic cells with their programming chain.
//
// Wiring between cells (row 0 is the north edge, column 0 the west edge):
//  * Each cell sees from its east neighbour that neighbour's Wout (E), C (Ce)
//    and Q (Qe), and likewise from the west (Eout, C, Q), south (Nout, C, Q)
//    and north (Sout, C, Q) neighbours.
//  * The length-4 signal E4 of cell (r,c) is the C output of cell (r,c+4),
//    the cell at the same place in the east 4x4 block; W4, S4, N4 likewise.
//  * Where a neighbour lies outside the array the edge input of that row or
//    column is used; the length-4 inputs that reach past the edge share the
//    edge input's x4 bit. Edge outputs carry the edge cell's redirection
//    output, C and Q, and as x4 the C output of the fourth cell in.
//  * All cells share clk and clear.
//
// Programming: every cell has a bc_config; their shift registers form one
// chain, cell (0,0) first, row by row, so a bit stream of ROWS*COLS*32 bits
// loads the whole array; the bit for cell k, bit b, is shifted in at
// position ROWS*COLS*32-1-(32k+b) (the last cell's top bit first). prog_tap
// brings out the chain at each quarter of its length; prog_tap[3] is the
// serial output of the chain.
//
// The array size follows the published 20x20 chip. The E4 rule, the edge
// handling and the chain order are this design's choices. The fabric's
// redirection paths form structural combinational loops, as in any FPGA
// routing fabric; a loop only closes if the configuration selects one, and
// configurations must not (as on the real chip, a closed loop oscillates).
`timescale 1ps / 1fs
module fpga_core
  import sige_fpga_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20
) (
  input  logic       clk,
  input  logic       clear,
  // programming chain
  input  logic       prog_clk,
  input  logic       shift_en,
  input  logic       sdi,
  input  logic       write_en,
  input  logic       wr_sel,
  input  logic       read_en,
  input  logic       rd_sel,
  output logic [3:0] prog_tap,
  // array edges
  input  nbr_t       west_in  [ROWS],
  input  nbr_t       east_in  [ROWS],
  input  nbr_t       north_in [COLS],
  input  nbr_t       south_in [COLS],
  output nbr_t       west_out  [ROWS],
  output nbr_t       east_out  [ROWS],
  output nbr_t       north_out [COLS],
  output nbr_t       south_out [COLS]
);
  localparam int unsigned NCELL = ROWS * COLS;

  logic cc   [ROWS][COLS];
  logic qq   [ROWS][COLS];
  logic no   [ROWS][COLS];
  logic eo   [ROWS][COLS];
  logic so   [ROWS][COLS];
  logic wo   [ROWS][COLS];
  logic chain [NCELL+1];

  assign chain[0] = sdi;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      nbr_t    ie, iw, is, in_;
      bc_cfg_t cfg;

      // east neighbour
      if (c < COLS - 1) begin : g_e
        assign ie.x = wo[r][c+1];
        assign ie.c = cc[r][c+1];
        assign ie.q = qq[r][c+1];
      end else begin : g_e_edge
        assign ie.x = east_in[r].x;
        assign ie.c = east_in[r].c;
        assign ie.q = east_in[r].q;
      end
      if (c + 4 < COLS) begin : g_e4
        assign ie.x4 = cc[r][c+4];
      end else begin : g_e4_edge
        assign ie.x4 = east_in[r].x4;
      end

      // west neighbour
      if (c > 0) begin : g_w
        assign iw.x = eo[r][c-1];
        assign iw.c = cc[r][c-1];
        assign iw.q = qq[r][c-1];
      end else begin : g_w_edge
        assign iw.x = west_in[r].x;
        assign iw.c = west_in[r].c;
        assign iw.q = west_in[r].q;
      end
      if (c >= 4) begin : g_w4
        assign iw.x4 = cc[r][c-4];
      end else begin : g_w4_edge
        assign iw.x4 = west_in[r].x4;
      end

      // south neighbour
      if (r < ROWS - 1) begin : g_s
        assign is.x = no[r+1][c];
        assign is.c = cc[r+1][c];
        assign is.q = qq[r+1][c];
      end else begin : g_s_edge
        assign is.x = south_in[c].x;
        assign is.c = south_in[c].c;
        assign is.q = south_in[c].q;
      end
      if (r + 4 < ROWS) begin : g_s4
        assign is.x4 = cc[r+4][c];
      end else begin : g_s4_edge
        assign is.x4 = south_in[c].x4;
      end

      // north neighbour
      if (r > 0) begin : g_n
        assign in_.x = so[r-1][c];
        assign in_.c = cc[r-1][c];
        assign in_.q = qq[r-1][c];
      end else begin : g_n_edge
        assign in_.x = north_in[c].x;
        assign in_.c = north_in[c].c;
        assign in_.q = north_in[c].q;
      end
      if (r >= 4) begin : g_n4
        assign in_.x4 = cc[r-4][c];
      end else begin : g_n4_edge
        assign in_.x4 = north_in[c].x4;
      end

      bc_config #(.W(BC_CFG_W)) u_cfg (
        .clk      (prog_clk),
        .shift_en (shift_en),
        .sdi      (chain[r*COLS + c]),
        .sdo      (chain[r*COLS + c + 1]),
        .write_en (write_en),
        .wr_sel   (wr_sel),
        .read_en  (read_en),
        .rd_sel   (rd_sel),
        .cfg      (cfg)
      );

      basic_cell u_bc (
        .clk   (clk),
        .clear (clear),
        .cfg   (cfg),
        .in_e  (ie),
        .in_w  (iw),
        .in_s  (is),
        .in_n  (in_),
        .c     (cc[r][c]),
        .q     (qq[r][c]),
        .nout  (no[r][c]),
        .eout  (eo[r][c]),
        .sout  (so[r][c]),
        .wout  (wo[r][c])
      );
    end
  end

  // Edge outputs.
  localparam int unsigned C4 = (COLS > 3) ? 3 : COLS - 1;
  localparam int unsigned R4 = (ROWS > 3) ? 3 : ROWS - 1;
  for (genvar r = 0; r < ROWS; r++) begin : g_we
    assign west_out[r] = '{x: wo[r][0],      x4: cc[r][C4],          c: cc[r][0],      q: qq[r][0]};
    assign east_out[r] = '{x: eo[r][COLS-1], x4: cc[r][COLS-1-C4],   c: cc[r][COLS-1], q: qq[r][COLS-1]};
  end
  for (genvar c = 0; c < COLS; c++) begin : g_ns
    assign north_out[c] = '{x: no[0][c],      x4: cc[R4][c],        c: cc[0][c],      q: qq[0][c]};
    assign south_out[c] = '{x: so[ROWS-1][c], x4: cc[ROWS-1-R4][c], c: cc[ROWS-1][c], q: qq[ROWS-1][c]};
  end

  for (genvar k = 0; k < 4; k++) begin : g_tap
    localparam int unsigned POS = ((k + 1) * NCELL) / 4;
    assign prog_tap[k] = chain[POS];
  end
endmodule
