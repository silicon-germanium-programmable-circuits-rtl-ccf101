// tb_fpga_core: end-to-end test of the cell array (8x8 here) through its
// serial programming chain.
// Configuration plane 0 maps several small circuits onto the array:
//  row 1  combinational pass west->east through eight Eout redirections;
//  row 2  an 8-stage shift register (each cell loads its west neighbour's Q),
//         whose latency must be 8 clock cycles;
//  row 3  a length-4 hop: cell (3,4) takes W4 (the C of cell (3,0)) and sends
//         it east through the F2 feed-through;
//  row 4  a 2:1 MUX with inverted inputs built from the edge's X, C and Q;
//  row 5  a toggle flip-flop (own Q, inverted, fed back through F1);
//  col 6  a north->south pass through Sout, col 2 south->north through Nout,
//  row 6  an east->west pass through Wout.
// Plane 1 holds an inverting version of row 1 and freezes row 2 (On2, hold).
// The test checks each circuit, switching planes with rd_sel, the all-off
// state while read_en is low, loading one plane while the other runs, the
// chain taps, and the clear.
`timescale 1ps / 1fs
module tb_fpga_core;
  import sige_fpga_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 8;
  localparam int unsigned N = ROWS * COLS;
  int checks = 0, failures = 0;

  logic clk = 0, clear = 1;
  logic shift_en = 0, sdi = 0, write_en = 0, wr_sel = 0, read_en = 0, rd_sel = 0;
  logic [3:0] prog_tap;
  nbr_t west_in [ROWS], east_in [ROWS], north_in [COLS], south_in [COLS];
  nbr_t west_out [ROWS], east_out [ROWS], north_out [COLS], south_out [COLS];

  fpga_core #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .clear(clear), .prog_clk(clk), .shift_en(shift_en), .sdi(sdi),
    .write_en(write_en), .wr_sel(wr_sel), .read_en(read_en), .rd_sel(rd_sel),
    .prog_tap(prog_tap), .west_in(west_in), .east_in(east_in), .north_in(north_in),
    .south_in(south_in), .west_out(west_out), .east_out(east_out),
    .north_out(north_out), .south_out(south_out));

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Codes (see the cell description): input MUX group base E=1, W=5, S=9, N=13;
  // member X=+0, X4=+1, C=+2, Q=+3; own Q = 17.
  localparam logic [4:0] I_W = 5, I_W4 = 6, I_CW = 7, I_QW = 8, I_S = 9, I_OWNQ = 17;
  // Output MUX codes: Eout N=1,S=2,W=3,F2=4; Nout E=1,W=2,S=3,F3=4;
  // Sout E=1,W=2,N=3,F3=4; Wout N=1,S=2,E=3,F1=4.

  bc_cfg_t plane [2][ROWS][COLS];

  task automatic build_planes();
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) plane[p][r][c] = '0;
    // plane 0
    for (int c = 0; c < COLS; c++) plane[0][1][c].eout_sel = 3;          // row 1 pass
    for (int c = 0; c < COLS; c++) begin                                  // row 2 shift register
      plane[0][2][c].f1_sel = (c == 0) ? I_W : I_QW;
      plane[0][2][c].on1    = 1'b1;
    end
    plane[0][3][0].f1_sel = I_W;                                          // row 3 length-4 hop
    plane[0][3][4].f2_sel = I_W4;
    plane[0][3][4].eout_sel = 4;
    for (int c = 5; c < COLS; c++) plane[0][3][c].eout_sel = 3;
    plane[0][4][0].f1_sel = I_W;                                          // row 4 MUX
    plane[0][4][0].f2_sel = I_CW;
    plane[0][4][0].f3_sel = I_QW;
    plane[0][4][0].inv    = 3'b011;
    plane[0][4][1].f2_sel = I_CW;
    plane[0][4][1].eout_sel = 4;
    for (int c = 2; c < COLS; c++) plane[0][4][c].eout_sel = 3;
    plane[0][5][COLS-1].f1_sel = I_OWNQ;                                  // row 5 toggle
    plane[0][5][COLS-1].inv    = 3'b001;
    plane[0][5][COLS-1].on1    = 1'b1;
    for (int r = 0; r < ROWS; r++) plane[0][r][6].sout_sel = 3;           // col 6 N->S
    for (int r = 0; r < ROWS; r++) plane[0][r][2].nout_sel = 3;           // col 2 S->N
    for (int c = 0; c < COLS; c++) plane[0][6][c].wout_sel = 3;           // row 6 E->W
    // plane 1: row 1 inverted (cell 0 inverts into C, cell 1 feeds C through F2),
    // row 2 frozen
    plane[1][1][0].f1_sel = I_W;
    plane[1][1][0].inv    = 3'b001;
    plane[1][1][1].f2_sel = I_CW;
    plane[1][1][1].eout_sel = 4;
    for (int c = 2; c < COLS; c++) plane[1][1][c].eout_sel = 3;
    for (int c = 0; c < COLS; c++) begin
      plane[1][2][c].f1_sel = (c == 0) ? I_W : I_QW;
      plane[1][2][c].on2    = 1'b1;
    end
  endtask

  // Shift one plane in: last cell's top bit first, cell 0's bit 0 last.
  task automatic load_plane(input int p);
    for (int k = N - 1; k >= 0; k--)
      for (int b = BC_CFG_W - 1; b >= 0; b--) begin
        @(negedge clk);
        shift_en = 1'b1;
        sdi = plane[p][k / COLS][k % COLS][b];
      end
    @(negedge clk);
    shift_en = 1'b0;
  endtask

  task automatic store(input int p);
    @(negedge clk); write_en = 1'b1; wr_sel = 1'(p);
    @(negedge clk); write_en = 1'b0;
  endtask

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  // row 2 reference: inputs applied to west_in[2].x, history of the last COLS values
  logic hist [$];
  int lat_seen;
  logic prev_t;
  int n_toggle;

  initial begin
    for (int r = 0; r < ROWS; r++) begin west_in[r] = '0; east_in[r] = '0; end
    for (int c = 0; c < COLS; c++) begin north_in[c] = '0; south_in[c] = '0; end
    build_planes();
    repeat (2) @(negedge clk);

    // cells are off while read_en is low
    #1;
    expect1(east_out[1].x, 1'b0, "off before read_en");

    load_plane(0);
    // the chain taps show the top bit of the cell at each quarter point
    for (int k = 0; k < 4; k++) begin
      int pos;
      pos = ((k + 1) * N) / 4 - 1;
      expect1(prog_tap[k], plane[0][pos / COLS][pos % COLS][BC_CFG_W-1], "chain tap");
    end
    store(0);
    @(negedge clk); clear = 1'b0; read_en = 1'b1; rd_sel = 1'b0;

    // combinational circuits
    for (int i = 0; i < 64; i++) begin
      logic a, b, s, w4, ns, sn, ew;
      {a, b, s, w4, ns, sn, ew} = 7'($urandom);
      west_in[1].x = a;
      west_in[3].x = w4;
      west_in[4].x = a; west_in[4].c = b; west_in[4].q = s;
      north_in[6].x = ns; south_in[2].x = sn; east_in[6].x = ew;
      #1;
      expect1(east_out[1].x, a, "row 1 pass");
      expect1(east_out[3].x, w4, "row 3 length-4 hop");
      expect1(east_out[4].x, s ? ~b : ~a, "row 4 mux");
      expect1(south_out[6].x, ns, "col 6 N->S");
      expect1(north_out[2].x, sn, "col 2 S->N");
      expect1(west_out[6].x, ew, "row 6 E->W");
    end

    // shift register latency and toggle flip-flop
    lat_seen = 0;
    n_toggle = 0;
    for (int i = 0; i < 40; i++) begin
      logic d;
      @(negedge clk);
      d = 1'($urandom);
      if (i == 10) d = 1'b1;
      west_in[2].x = d;
      hist.push_back(d);
      prev_t = east_out[5].q;
      @(posedge clk); #1;
      if (prev_t !== east_out[5].q) n_toggle++;
      if (hist.size() >= COLS) begin
        expect1(east_out[2].q, hist[hist.size() - COLS], "row 2 shift register, COLS-cycle latency");
      end
    end
    expect1(n_toggle == 40, 1'b1, "row 5 toggles every cycle");

    // load plane 1 while plane 0 keeps running, then switch
    fork
      load_plane(1);
      begin
        for (int i = 0; i < N * BC_CFG_W; i++) begin
          @(negedge clk);
          west_in[2].x = 1'($urandom);
          hist.push_back(west_in[2].x);
        end
      end
    join
    store(1);
    @(negedge clk); hist.push_back(west_in[2].x);
    @(negedge clk); hist.push_back(west_in[2].x);
    #1;
    expect1(east_out[2].q, hist[hist.size() - COLS - 1], "row 2 kept running during load");
    rd_sel = 1'b1;   // switch to plane 1
    begin
      logic frozen;
      frozen = east_out[2].q;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        west_in[1].x = 1'($urandom);
        west_in[2].x = 1'($urandom);
        #1;
        expect1(east_out[1].x, ~west_in[1].x, "plane 1 row 1 inverted");
        expect1(east_out[2].q, frozen, "plane 1 row 2 holds");
        expect1(east_out[3].x, 1'b0, "plane 1 row 3 unused");
      end
    end
    rd_sel = 1'b0;
    #1;
    expect1(east_out[1].x, west_in[1].x, "back to plane 0");

    // clear empties the shift register
    west_in[2].x = 1'b1;
    repeat (COLS + 1) @(posedge clk);
    #1;
    expect1(east_out[2].q, 1'b1, "row 2 filled with ones");
    clear = 1'b1;
    #1;
    expect1(east_out[2].q, 1'b0, "clear");
    @(negedge clk); clear = 1'b0;

    read_en = 1'b0;
    #1;
    expect1(east_out[1].x | east_out[5].q | south_out[6].x, 1'b0, "read_en low switches cells off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
