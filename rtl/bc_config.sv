// bc_config: programming circuit of one basic cell.
//
// The configuration bit stream is shifted serially through a W-bit shift
// register in every cell (sdi -> bit 0 ... bit W-1 -> sdo, one bit per clock
// while shift_en is high). Once the whole chain is loaded, write_en copies
// the shift register into one of two RAM words (wr_sel). The cell is
// configured from RAM word rd_sel only while read_en is high; otherwise cfg is
// all zero, which switches every tree of the cell off, so random power-up RAM
// contents cannot enable cells. Holding two words lets the cell switch between
// two configurations in one cycle (by rd_sel) and lets one word be rewritten
// while the other is in use.
//
// Shift, Write_EN, Read_EN and the two stored configurations follow the
// published programming circuit; the separate read/write word selects and
// the shift direction are this design's choices. There is no reset: the RAM
// powers up unknown, as the read enable anticipates.
//
// Timing: shift and write happen on the rising edge of clk; cfg follows
// read_en and rd_sel combinationally.
`timescale 1ps / 1fs
module bc_config #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         shift_en,
  input  logic         sdi,
  output logic         sdo,
  input  logic         write_en,
  input  logic         wr_sel,
  input  logic         read_en,
  input  logic         rd_sel,
  output logic [W-1:0] cfg
);
  logic [W-1:0] sr;
  logic [W-1:0] ram [2];

  always_ff @(posedge clk) begin
    if (shift_en) sr <= {sr[W-2:0], sdi};
  end

  always_ff @(posedge clk) begin
    if (write_en) ram[wr_sel] <= sr;
  end

  assign sdo = sr[W-1];
  assign cfg = read_en ? ram[rd_sel] : '0;
endmodule
