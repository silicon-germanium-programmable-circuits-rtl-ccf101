// ffi_vco: behavioural model of the feed-forward interpolated VCO.
//
// Behavioural model, not synthesizable logic. The real circuit is a ring of
// four differential CML stages; each stage sums, with weights set by the
// differential control voltage, the signal of the previous stage (A) and the
// leap signal of the stage before that (B). With only A the ring is a
// four-stage oscillator (lowest frequency); with only B it runs as two
// two-stage rings (highest frequency). This model keeps only the resulting
// transfer function: the output frequency is linear in vctrl between F_MIN_GHZ
// at V_MIN and F_MAX_GHZ at V_MAX, clamped outside that span. The defaults are
// the chip's measured tuning range (8 to 13.7 GHz) over the 0.7-1.2 V control
// span; treating the curve as linear is this model's simplification.
//
// Interface: en starts and stops the oscillation (out_p low, out_n high while
// stopped); out_p/out_n are the differential clock. The period is recomputed
// each half cycle, so a change of vctrl takes effect within one cycle.
`timescale 1ps / 1fs
module ffi_vco #(
  parameter real F_MIN_GHZ = 8.0,
  parameter real F_MAX_GHZ = 13.7,
  parameter real V_MIN     = 0.7,
  parameter real V_MAX     = 1.2
) (
  input  logic en,
  input  real  vctrl,
  output logic out_p,
  output logic out_n
);
  real f_ghz;
  real half_ps;

  function automatic real freq_of(real v);
    real vc;
    vc = (v < V_MIN) ? V_MIN : ((v > V_MAX) ? V_MAX : v);
    return F_MIN_GHZ + (F_MAX_GHZ - F_MIN_GHZ) * (vc - V_MIN) / (V_MAX - V_MIN);
  endfunction

  initial out_p = 1'b0;

  always begin
    if (!en) begin
      out_p = 1'b0;
      @(posedge en);
    end else begin
      f_ghz   = freq_of(vctrl);
      half_ps = 500.0 / f_ghz;
      #(half_ps) out_p = en ? ~out_p : 1'b0;
    end
  end

  assign out_n = ~out_p;
endmodule
