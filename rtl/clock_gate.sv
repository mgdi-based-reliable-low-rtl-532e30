// clock_gate: latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while `clk` is
// low and holds while it is high; the gated clock is `clk` AND the latched
// enable. An enable that settles before the rising edge lets exactly that
// clock pulse through, and enable changes during the high phase cannot
// cut or create a pulse. A register whose input multiplexer would only
// recirculate its own value when the enable is low can be clocked by this
// cell instead, so it receives no clock at all while it holds.
//
// Gating registers that do not change, in place of their enable
// multiplexer, follows the document's description of RTL clock splitting;
// the latch-and-AND cell is the usual way to do it and is this design's
// choice. The latch is intended (it is the gating cell's storage).
//
// Timing: `en` must be stable from before the rising edge of `clk` it is
// meant to pass until that edge; `gclk` follows `clk` with a gate delay.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
