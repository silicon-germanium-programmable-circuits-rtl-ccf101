// sige_fpga_chip: top level of the SiGe FPGA test chip.
//
// The ROWS x COLS FPGA core (fpga_core) is surrounded by test circuitry:
//  * ffi_vco, the on-chip oscillator (behavioural model), whose output is
//    brought to the osc_out pad and divided by freq_divider into four test
//    signals;
//  * two test_signal_mux instances that feed the core either the external
//    4-bit inputs sig_a / sig_b or the divider outputs (sel_a / sel_b = 1);
//  * clock_select, which clocks the core from ext_clk or from the oscillator
//    (clk_sel = 1);
//  * output_select, which brings one of the four core outputs to fpga_out and
//    one of the four programming-chain taps to prog_out.
//
// Core connections (this design's choice): Signal A drives the W redirection
// input of rows 0-3 on the west edge, Signal B that of rows 4-7; the core
// outputs are the Eout redirection outputs of rows 0-3 on the east edge; all
// other edge inputs are 0. The programming chain is clocked by ext_clk and
// controlled by the shift_en, write_en/wr_sel (Write_EN) and read_en/rd_sel
// (Read_EN) pins, the bit stream entering at data. clear clears every D-FF;
// rst_n resets the divider.
//
// Timing: the core is synchronous to the selected clock; programming is
// synchronous to ext_clk; the pad outputs are combinational from the core.
`timescale 1ps / 1fs
module sige_fpga_chip
  import sige_fpga_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20
) (
  input  logic       ext_clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [3:0] sig_a,
  input  logic [3:0] sig_b,
  input  logic       sel_a,
  input  logic       sel_b,
  input  logic       clk_sel,
  // oscillator
  input  logic       osc_en,
  input  real        vctrl,
  output logic       osc_out,
  // programming
  input  logic       data,
  input  logic       shift_en,
  input  logic       write_en,
  input  logic       wr_sel,
  input  logic       read_en,
  input  logic       rd_sel,
  // output select
  input  logic [1:0] core_sel,
  input  logic [1:0] prog_sel,
  output logic       fpga_out,
  output logic       prog_out
);
  logic       osc_p, osc_n;
  logic       core_clk;
  logic [3:0] div;
  logic [3:0] a_in, b_in;
  logic [3:0] core_out;
  logic [3:0] prog_tap;

  nbr_t west_in  [ROWS];
  nbr_t east_in  [ROWS];
  nbr_t north_in [COLS];
  nbr_t south_in [COLS];
  nbr_t west_out  [ROWS];
  nbr_t east_out  [ROWS];
  nbr_t north_out [COLS];
  nbr_t south_out [COLS];

  ffi_vco u_vco (.en(osc_en), .vctrl(vctrl), .out_p(osc_p), .out_n(osc_n));
  assign osc_out = osc_p;

  freq_divider u_div (.clk(osc_p), .rst_n(rst_n), .div(div));

  test_signal_mux #(.W(4)) u_mux_a (.ext_sig(sig_a), .test_sig(div), .sel(sel_a), .y(a_in));
  test_signal_mux #(.W(4)) u_mux_b (.ext_sig(sig_b), .test_sig(div), .sel(sel_b), .y(b_in));

  clock_select u_clksel (.ext_clk(ext_clk), .osc_clk(osc_p), .sel(clk_sel), .clk(core_clk));

  for (genvar r = 0; r < ROWS; r++) begin : g_rows
    if (r < 4) begin : g_a
      assign west_in[r] = '{x: a_in[r], x4: 1'b0, c: 1'b0, q: 1'b0};
    end else if (r < 8) begin : g_b
      assign west_in[r] = '{x: b_in[r-4], x4: 1'b0, c: 1'b0, q: 1'b0};
    end else begin : g_z
      assign west_in[r] = '0;
    end
    assign east_in[r] = '0;
    if (r < 4) begin : g_o
      assign core_out[r] = east_out[r].x;
    end
  end
  for (genvar c = 0; c < COLS; c++) begin : g_cols
    assign north_in[c] = '0;
    assign south_in[c] = '0;
  end

  fpga_core #(.ROWS(ROWS), .COLS(COLS)) u_core (
    .clk       (core_clk),
    .clear     (clear),
    .prog_clk  (ext_clk),
    .shift_en  (shift_en),
    .sdi       (data),
    .write_en  (write_en),
    .wr_sel    (wr_sel),
    .read_en   (read_en),
    .rd_sel    (rd_sel),
    .prog_tap  (prog_tap),
    .west_in   (west_in),
    .east_in   (east_in),
    .north_in  (north_in),
    .south_in  (south_in),
    .west_out  (west_out),
    .east_out  (east_out),
    .north_out (north_out),
    .south_out (south_out)
  );

  output_select u_osel (
    .core_out (core_out),
    .core_sel (core_sel),
    .prog_out (prog_tap),
    .prog_sel (prog_sel),
    .fpga_pad (fpga_out),
    .prog_pad (prog_out)
  );
endmodule
