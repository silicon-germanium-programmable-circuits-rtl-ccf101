// tb_sige_fpga_chip: end-to-end test of the whole chip at its full 20x20 size,
// driven only through its pins.
// Two configuration planes are shifted in through the data pin (400 cells x
// 32 bits each) and stored with write_en. Plane 0 maps:
//  row 0  Signal A bit 0, inverted in cell (0,0), to core output 0;
//  row 1  a 20-stage shift register from Signal A bit 1 to core output 1
//         (latency 20 core clocks; the last cell feeds its own Q out through F2);
//  row 2  a 2:1 MUX in cell (2,0): sel = Signal A bit 3 (the C of cell (3,0),
//         input Cs), inputs Signal A bit 2 (W) and Signal B bit 0 (brought up
//         column 0 by the Nout redirections of cells (4,0) and (3,0));
//  row 3  a toggle flip-flop in cell (3,19) driving core output 3.
// Plane 1 passes Signal A bit 0 uninverted and freezes row 1 (hold).
// The test counts how often each mechanism happens and fails if one never
// does: programming taps, read-enable gating, plane switch, redirection,
// feed-through, D-FF load, hold and clear, test-signal select (divider into
// the core), clock select (core clocked by the oscillator), output select.
`timescale 1ps / 1fs
module tb_sige_fpga_chip;
  import sige_fpga_pkg::*;
  localparam int unsigned ROWS = 20, COLS = 20;
  localparam int unsigned N = ROWS * COLS;
  int checks = 0, failures = 0;

  logic ext_clk = 0, rst_n = 0, clear = 1;
  logic [3:0] sig_a = '0, sig_b = '0;
  logic sel_a = 0, sel_b = 0, clk_sel = 0, osc_en = 0;
  real  vctrl = 0.95;
  logic osc_out;
  logic data = 0, shift_en = 0, write_en = 0, wr_sel = 0, read_en = 0, rd_sel = 0;
  logic [1:0] core_sel = 0, prog_sel = 0;
  logic fpga_out, prog_out;

  sige_fpga_chip dut (
    .ext_clk(ext_clk), .rst_n(rst_n), .clear(clear), .sig_a(sig_a), .sig_b(sig_b),
    .sel_a(sel_a), .sel_b(sel_b), .clk_sel(clk_sel), .osc_en(osc_en), .vctrl(vctrl),
    .osc_out(osc_out), .data(data), .shift_en(shift_en), .write_en(write_en),
    .wr_sel(wr_sel), .read_en(read_en), .rd_sel(rd_sel), .core_sel(core_sel),
    .prog_sel(prog_sel), .fpga_out(fpga_out), .prog_out(prog_out));

  // external clock: 1 GHz, so the test is not tied to the oscillator's speed
  always #500 ext_clk = ~ext_clk;

  initial begin
    repeat (40000) @(posedge ext_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] I_W = 5, I_CW = 7, I_QW = 8, I_S = 9, I_CS = 11, I_OWNQ = 17;

  bc_cfg_t plane [2][ROWS][COLS];
  int n_tap, n_gate, n_switch, n_redir, n_feed, n_load, n_hold, n_clear, n_test_sel,
      n_clk_sel, n_out_sel;

  task automatic build_planes();
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) plane[p][r][c] = '0;
    // row 0: inverter at (0,0), C fed through F2 of (0,1), Eout pass to the edge
    plane[0][0][0].f1_sel = I_W;
    plane[0][0][0].inv    = 3'b001;
    plane[0][0][1].f2_sel = I_CW;
    plane[0][0][1].eout_sel = 4;
    for (int c = 2; c < COLS; c++) plane[0][0][c].eout_sel = 3;
    // row 1: shift register
    for (int c = 0; c < COLS; c++) begin
      plane[0][1][c].f1_sel = (c == 0) ? I_W : I_QW;
      plane[0][1][c].on1    = 1'b1;
    end
    plane[0][1][COLS-1].f2_sel   = I_OWNQ;
    plane[0][1][COLS-1].eout_sel = 4;
    // row 2: MUX
    plane[0][4][0].nout_sel = 2;        // W (Signal B bit 0) north
    plane[0][3][0].nout_sel = 3;        // S north
    plane[0][3][0].f1_sel   = I_W;      // C(3,0) = Signal A bit 3
    plane[0][2][0].f1_sel   = I_W;
    plane[0][2][0].f2_sel   = I_S;
    plane[0][2][0].f3_sel   = I_CS;
    plane[0][2][1].f2_sel   = I_CW;
    plane[0][2][1].eout_sel = 4;
    for (int c = 2; c < COLS; c++) plane[0][2][c].eout_sel = 3;
    // row 3: toggle flip-flop at the east edge
    plane[0][3][COLS-1].f1_sel   = I_OWNQ;
    plane[0][3][COLS-1].inv      = 3'b001;
    plane[0][3][COLS-1].on1      = 1'b1;
    plane[0][3][COLS-1].f2_sel   = I_OWNQ;
    plane[0][3][COLS-1].eout_sel = 4;
    // plane 1: row 0 buffer, row 1 frozen
    for (int c = 0; c < COLS; c++) plane[1][0][c].eout_sel = 3;
    for (int c = 0; c < COLS; c++) begin
      plane[1][1][c] = plane[0][1][c];
      plane[1][1][c].on1 = 1'b0;
      plane[1][1][c].on2 = 1'b1;
    end
  endtask

  task automatic load_plane(input int p);
    for (int k = N - 1; k >= 0; k--)
      for (int b = BC_CFG_W - 1; b >= 0; b--) begin
        @(negedge ext_clk);
        shift_en = 1'b1;
        data = plane[p][k / COLS][k % COLS][b];
      end
    @(negedge ext_clk);
    shift_en = 1'b0;
  endtask

  task automatic store(input int p);
    @(negedge ext_clk); write_en = 1'b1; wr_sel = 1'(p);
    @(negedge ext_clk); write_en = 1'b0;
  endtask

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time); end
    if (failures >= 10) begin
      // stop early: the design is clearly broken
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  task automatic observe(input int unsigned sel);
    core_sel = 2'(sel);
    #1;
  endtask

  // time between two rising edges of fpga_out
  task automatic measure_period(output realtime per);
    realtime t0;
    @(posedge fpga_out); t0 = $realtime;
    @(posedge fpga_out); per = $realtime - t0;
  endtask

  logic hist [$];

  initial begin
    {n_tap, n_gate, n_switch, n_redir, n_feed, n_load, n_hold, n_clear, n_test_sel,
     n_clk_sel, n_out_sel} = '0;
    build_planes();
    repeat (2) @(negedge ext_clk);
    rst_n = 1'b1;

    // read_en low: every cell is off
    observe(0);
    expect1(fpga_out, 1'b0, "output off before read_en"); n_gate++;

    load_plane(0);
    for (int k = 0; k < 4; k++) begin
      int pos;
      pos = ((k + 1) * N) / 4 - 1;
      prog_sel = 2'(k);
      #1;
      expect1(prog_out, plane[0][pos / COLS][pos % COLS][BC_CFG_W-1], "programming tap");
      n_tap++;
    end
    store(0);
    @(negedge ext_clk); clear = 1'b0; read_en = 1'b1; rd_sel = 1'b0;

    // combinational paths: rows 0 and 2
    for (int i = 0; i < 64; i++) begin
      sig_a = 4'($urandom); sig_b = 4'($urandom);
      observe(0);
      expect1(fpga_out, ~sig_a[0], "row 0 inverter"); n_redir++; n_feed++; n_out_sel++;
      observe(2);
      expect1(fpga_out, sig_a[3] ? sig_b[0] : sig_a[2], "row 2 mux"); n_out_sel++;
    end

    // row 1 shift register, 20 cycles of latency; row 3 toggles every cycle
    observe(1);
    for (int i = 0; i < 60; i++) begin
      logic t_before;
      @(negedge ext_clk);
      sig_a[1] = 1'($urandom);
      hist.push_back(sig_a[1]);
      core_sel = 2'd3; #1; t_before = fpga_out;
      @(posedge ext_clk); #1;
      core_sel = 2'd3; #1;
      expect1(fpga_out, ~t_before, "row 3 toggle");
      core_sel = 2'd1; #1;
      if (hist.size() >= COLS) begin
        expect1(fpga_out, hist[hist.size() - COLS], "row 1 shift register, 20-cycle latency");
        n_load++;
      end
    end

    // second plane: shift it in while plane 0 runs, store, switch
    load_plane(1);
    store(1);
    @(negedge ext_clk);
    rd_sel = 1'b1; n_switch++;
    begin
      logic frozen;
      observe(1);
      frozen = fpga_out;
      for (int i = 0; i < 25; i++) begin
        @(negedge ext_clk);
        sig_a = 4'($urandom);
        observe(0);
        expect1(fpga_out, sig_a[0], "plane 1 row 0 buffer");
        observe(1);
        expect1(fpga_out, frozen, "plane 1 row 1 holds"); n_hold++;
      end
    end
    rd_sel = 1'b0; n_switch++;
    observe(0);
    expect1(fpga_out, ~sig_a[0], "back to plane 0");

    // clear the shift register
    sig_a[1] = 1'b1;
    repeat (COLS + 1) @(posedge ext_clk);
    observe(1);
    expect1(fpga_out, 1'b1, "row 1 full of ones");
    clear = 1'b1;
    observe(1);
    expect1(fpga_out, 1'b0, "clear"); n_clear++;
    @(negedge ext_clk); clear = 1'b0;

    // oscillator, divider and test-signal select: Signal A <- divider, so
    // fpga_out (row 0, inverted) is the inverse of the /2 output
    osc_en = 1'b1;
    sel_a  = 1'b1;
    observe(0);
    begin
      realtime per, exp_per;
      exp_per = 2.0 * 1000.0 / (8.0 + (13.7 - 8.0) * (vctrl - 0.7) / 0.5);
      measure_period(per);
      checks++;
      if (per < exp_per * 0.99 || per > exp_per * 1.01) begin
        failures++; $display("FAIL divider /2 period %0f ps, expected %0f", per, exp_per);
      end
      n_test_sel++;
      // clock select: core clocked by the oscillator; row 3 toggles at osc/2
      sel_a   = 1'b0;
      clk_sel = 1'b1;
      observe(3);
      measure_period(per);
      checks++;
      if (per < exp_per * 0.99 || per > exp_per * 1.01) begin
        failures++; $display("FAIL oscillator-clocked toggle period %0f ps, expected %0f", per, exp_per);
      end
      n_clk_sel++;
      clk_sel = 1'b0;
    end

    // read_en low: everything off again
    read_en = 1'b0;
    observe(0);
    expect1(fpga_out, 1'b0, "read_en low"); n_gate++;

    $display("mechanisms: taps %0d, read gate %0d, plane switch %0d, redirection %0d, feed-through %0d, load %0d, hold %0d, clear %0d, test select %0d, clock select %0d, output select %0d",
             n_tap, n_gate, n_switch, n_redir, n_feed, n_load, n_hold, n_clear, n_test_sel, n_clk_sel, n_out_sel);
    if (n_tap == 0 || n_gate == 0 || n_switch == 0 || n_redir == 0 || n_feed == 0 || n_load == 0 ||
        n_hold == 0 || n_clear == 0 || n_test_sel == 0 || n_clk_sel == 0 || n_out_sel == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
