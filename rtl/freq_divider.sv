// freq_divider: divides the on-chip oscillator clock into four test signals.
//
// A free-running binary counter on clk; output k is counter bit DIV_LOG2[k]-1,
// a square wave at clk / 2**DIV_LOG2[k]. The default taps give /2, /4, /8 and
// /32 as labelled on the chip's block diagram; '{1,2,3,4} gives the /2, /4,
// /8, /16 set that the chip description also mentions. The counter structure
// and the reset are this design's choices.
//
// Timing: every output changes on a rising edge of clk; all are low after reset.
`timescale 1ps / 1fs
module freq_divider #(
  parameter int unsigned DIV_LOG2 [4] = '{1, 2, 3, 5}
) (
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  output logic [3:0] div
);
  localparam int unsigned CW = 8;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  for (genvar k = 0; k < 4; k++) begin : g_tap
    assign div[k] = cnt[DIV_LOG2[k] - 1];
  end
endmodule
