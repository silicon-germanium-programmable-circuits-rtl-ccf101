// tb_chip_workloads: the two application circuits of the chip's evaluation,
// mapped cell by cell onto the full 20x20 chip and run from the on-chip
// oscillator clock.
//
// Plane 0, 4:1 serialiser (tree of 2:1 serialisers, as in the chip's
// demonstration): Signal A bits 0-3 carry channels CH1-CH4. Cells (0,0),
// (1,0), (3,0), (4,0) register CH1, CH2, CH3, CH4 (CH3 and CH4 are brought
// down column 0 by Sout redirections). The first-stage 2:1 MUX+D-FF cells
// (1,1) (CH2/CH1) and (3,1) (CH3/CH4) are switched by T1, a divide-by-4 bit
// built in cells (0,2)/(0,3) and (3,2)/(3,3); the final 2:1 MUX in cell (2,1)
// is switched by the divide-by-2 bit T0 (toggle cell (2,3), fed in through
// the Wout feed-through of cell (2,2)). Cell (2,2) takes the output on its F2
// and it travels along row 2 to core output 2. One output bit per clock
// cycle, in the order CH2, CH4, CH1, CH3.
//
// Plane 1, 4-bit binary counter: bit cells (3,0)-(3,3) toggle when their
// carry is 1 (C = carry ? ~Q : Q); carry cells (2,0)-(2,3) form
// carry[k+1] = carry[k] & Q[k] (a 2:1 MUX with input F1 off is an AND) and
// pass carry[k] down through their Sout feed-through. The most significant
// bit travels along row 3 to core output 3 and must follow bit 3 of the
// cycle count.
//
// Each output is compared every oscillator cycle with a cycle model of the
// mapped circuit; the serialiser's output rate (one bit per core clock) and
// the counter's period (16 clocks) are checked too.
`timescale 1ps / 1fs
module tb_chip_workloads;
  import sige_fpga_pkg::*;
  localparam int unsigned ROWS = 20, COLS = 20;
  localparam int unsigned N = ROWS * COLS;
  int checks = 0, failures = 0;

  logic ext_clk = 0, rst_n = 0, clear = 1;
  logic [3:0] sig_a = '0, sig_b = '0;
  logic sel_a = 0, sel_b = 0, clk_sel = 0, osc_en = 0;
  real  vctrl = 1.2;           // top of the tuning range: 13.7 GHz
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

  always #500 ext_clk = ~ext_clk;

  initial begin
    repeat (40000) @(posedge ext_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input MUX codes
  localparam logic [4:0] I_QE = 4, I_W = 5, I_CW = 7, I_QW = 8, I_CS = 11, I_QS = 12,
                         I_NX = 13, I_CN = 15, I_QN = 16, I_EX = 1, I_OWNQ = 17;

  bc_cfg_t plane [2][ROWS][COLS];

  function automatic bc_cfg_t toggle_cell();
    bc_cfg_t t = '0;
    t.f1_sel = I_OWNQ; t.inv = 3'b001; t.on1 = 1'b1;
    return t;
  endfunction

  // T1 cell: Q <= T0 ? ~Q : Q, with T0 the Q of the east neighbour
  function automatic bc_cfg_t div4_cell();
    bc_cfg_t t = '0;
    t.f1_sel = I_OWNQ; t.f2_sel = I_OWNQ; t.inv = 3'b010; t.f3_sel = I_QE; t.on1 = 1'b1;
    return t;
  endfunction

  task automatic build_planes();
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) plane[p][r][c] = '0;
    // ---- plane 0: 4:1 serialiser
    plane[0][0][0].f1_sel = I_W;  plane[0][0][0].on1 = 1'b1;   // CH1 register
    plane[0][1][0].f1_sel = I_W;  plane[0][1][0].on1 = 1'b1;   // CH2 register
    plane[0][2][0].sout_sel = 2;                                // CH3 (W) south
    plane[0][3][0].f1_sel = I_NX; plane[0][3][0].on1 = 1'b1;   // CH3 register
    plane[0][3][0].sout_sel = 2;                                // CH4 (W) south
    plane[0][4][0].f1_sel = I_NX; plane[0][4][0].on1 = 1'b1;   // CH4 register
    // (0,1): copy of CH1 (C), and T1 passed south through its F3 feed-through
    plane[0][0][1].f1_sel = I_QW; plane[0][0][1].f2_sel = I_QW;
    plane[0][0][1].f3_sel = I_QE; plane[0][0][1].sout_sel = 4;
    plane[0][0][2] = div4_cell();                               // T1a
    plane[0][0][3] = toggle_cell();                             // T0a
    // (1,1): first stage, T1 ? CH1 : CH2
    plane[0][1][1].f1_sel = I_QW; plane[0][1][1].f2_sel = I_CN;
    plane[0][1][1].f3_sel = I_NX; plane[0][1][1].on1 = 1'b1;
    // (4,1): copy of CH4
    plane[0][4][1].f1_sel = I_QW;
    // (3,1): first stage, T1 ? CH4 : CH3
    plane[0][3][1].f1_sel = I_QW; plane[0][3][1].f2_sel = I_CS;
    plane[0][3][1].f3_sel = I_QE; plane[0][3][1].on1 = 1'b1;
    plane[0][3][2] = div4_cell();                               // T1b
    plane[0][3][3] = toggle_cell();                             // T0b
    // (2,1): final stage, T0 ? Mb : Ma
    plane[0][2][1].f1_sel = I_QN; plane[0][2][1].f2_sel = I_QS; plane[0][2][1].f3_sel = I_EX;
    // (2,2): T0 fed back west through F1, serialiser output taken east through F2
    plane[0][2][2].f1_sel = I_QE; plane[0][2][2].wout_sel = 4;
    plane[0][2][2].f2_sel = I_CW; plane[0][2][2].eout_sel = 4;
    plane[0][2][3] = toggle_cell();                             // T0c
    plane[0][2][3].eout_sel = 3;
    for (int c = 4; c < COLS; c++) plane[0][2][c].eout_sel = 3;
    // ---- plane 1: 4-bit counter
    for (int k = 0; k < 4; k++) begin
      // bit cell (3,k)
      plane[1][3][k].f1_sel = I_OWNQ;
      plane[1][3][k].on1    = 1'b1;
      if (k == 0) begin
        plane[1][3][k].inv = 3'b001;                            // carry[0] = 1: plain toggle
      end else begin
        plane[1][3][k].f2_sel = I_OWNQ;
        plane[1][3][k].inv    = 3'b010;
        plane[1][3][k].f3_sel = I_NX;                           // carry[k] from (2,k) Sout
      end
      // carry cell (2,k): carry[k+1] = carry[k] & Q[k]
      if (k == 0) begin
        plane[1][2][k].f1_sel = I_QS;
      end else begin
        plane[1][2][k].f2_sel   = I_QS;
        plane[1][2][k].f3_sel   = I_CW;
        plane[1][2][k].sout_sel = 4;
      end
    end
    plane[1][3][3].f2_sel = I_OWNQ;                             // raw Q[3] for the feed-through
    plane[1][3][3].eout_sel = 4;
    for (int c = 4; c < COLS; c++) plane[1][3][c].eout_sel = 3;
  endtask

  task automatic load_and_store(input int p);
    for (int k = N - 1; k >= 0; k--)
      for (int b = BC_CFG_W - 1; b >= 0; b--) begin
        @(negedge ext_clk);
        shift_en = 1'b1;
        data = plane[p][k / COLS][k % COLS][b];
      end
    @(negedge ext_clk); shift_en = 1'b0; write_en = 1'b1; wr_sel = 1'(p);
    @(negedge ext_clk); write_en = 1'b0;
  endtask

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time); end
    if (failures >= 10) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  // serialiser cycle model
  logic [3:0] chq;          // CH1..CH4 registers
  logic       t0, t1, ma, mb;
  int         order [$];    // channel index seen at each output slot
  realtime    t_first, t_last;
  int         n_bits;
  int         ncyc = 0;     // rising oscillator edges, for the output slot phase

  always @(posedge osc_out) ncyc++;

  initial begin
    build_planes();
    osc_en = 1'b1;
    repeat (2) @(negedge ext_clk);
    rst_n = 1'b1;
    load_and_store(0);
    load_and_store(1);

    // ---------------- serialiser, core on the oscillator
    clk_sel = 1'b1; read_en = 1'b1; rd_sel = 1'b0; core_sel = 2'd2;
    @(negedge osc_out);
    clear = 1'b0;
    {chq, t0, t1, ma, mb} = '0;
    n_bits = 0;
    for (int n = 1; n <= 400; n++) begin
      logic [3:0] ch_in;
      // new channel words every fourth cycle; distinct patterns so the
      // output order can be identified
      if ((n - 1) % 4 == 0) begin
        if (n < 40) ch_in = 4'b0010 << (((n - 1) / 4) % 4);  // one-hot walk
        else        ch_in = 4'($urandom);
        sig_a = ch_in;
      end
      @(posedge osc_out);
      // model the edge
      begin
        logic nma, nmb;
        nma = t1 ? chq[0] : chq[1];
        nmb = t1 ? chq[3] : chq[2];
        t1 = t1 ^ t0;
        t0 = ~t0;
        ma = nma; mb = nmb;
        chq = sig_a;
      end
      #0.5;
      expect1(fpga_out, t0 ? mb : ma, "serialiser output");
      if (n_bits == 0) t_first = $realtime;
      t_last = $realtime;
      n_bits++;
      @(negedge osc_out);
    end
    begin
      realtime per;
      per = (t_last - t_first) / (n_bits - 1);
      $display("serialiser: %0d bits, one every %0f ps (%0f Gbit/s)", n_bits, per, 1000.0 / per);
      checks++;
      if (per < 72.0 || per > 74.0) begin failures++; $display("FAIL serialiser bit period %0f ps", per); end
    end

    // order check: hold CH1..CH4 = 1,0,0,0 etc. and note the slot each appears in
    for (int ch = 0; ch < 4; ch++) begin
      int seen;
      seen = -1;
      @(negedge osc_out);
      sig_a = 4'b0001 << ch;
      repeat (3) @(posedge osc_out);     // let the registers fill
      for (int s = 0; s < 4; s++) begin
        @(posedge osc_out); #0.5;
        if (fpga_out) begin
          if (seen >= 0) begin failures++; $display("FAIL channel %0d appears twice in 4 slots", ch + 1); end
          seen = ncyc % 4;
        end
      end
      checks++;
      if (seen < 0) begin failures++; $display("FAIL channel %0d never appears", ch + 1); end
      order.push_back(seen);
    end
    // the slots of CH1..CH4 must follow the order CH2, CH4, CH1, CH3
    checks++;
    if (((order[3] - order[1] + 4) % 4) != 1 || ((order[0] - order[3] + 4) % 4) != 1 ||
        ((order[2] - order[0] + 4) % 4) != 1) begin
      failures++; $display("FAIL output order: slots CH1..CH4 = %p", order);
    end else $display("serialiser order CH2, CH4, CH1, CH3 confirmed");

    // ---------------- 4-bit counter from plane 1
    @(negedge osc_out);
    rd_sel = 1'b1; core_sel = 2'd3; clear = 1'b1;
    @(negedge osc_out);
    clear = 1'b0;
    begin
      int cnt;
      int rises;
      realtime t_r0, t_r1;
      cnt = 0; rises = 0;
      for (int n = 1; n <= 100; n++) begin
        logic prev;
        prev = fpga_out;
        @(posedge osc_out);
        cnt = (cnt + 1) % 16;
        #0.5;
        expect1(fpga_out, cnt[3], "counter bit 3");
        if (!prev && fpga_out) begin
          if (rises == 0) t_r0 = $realtime;
          t_r1 = $realtime;
          rises++;
        end
        @(negedge osc_out);
      end
      checks++;
      if (rises < 2) begin failures++; $display("FAIL counter never wrapped"); end
      else $display("counter: bit 3 period %0f ps (16 clock cycles)", (t_r1 - t_r0) / (rises - 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
