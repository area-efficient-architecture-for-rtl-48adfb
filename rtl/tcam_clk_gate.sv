// tcam_clk_gate: clock gate used to switch off a layer's OATs when unused.
//
// A latch-based integrated clock gate: the enable is captured by a latch
// that is transparent while clk is low, and the gated clock is clk ANDed
// with the latched enable.  Because the latch is closed while clk is high,
// a change of `en` during the high phase cannot cut or create a pulse.
// The published architecture asks for clock gating driven by enable signals; the latch
// structure is the usual glitch-free form and is this RTL's choice.
//
// Timing: gclk pulses on a rising edge of clk exactly when `en` was high
// just before that edge.  The latch is intended and is the reason for the
// latch warning a lint tool gives on this module.
module tcam_clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
