// clk_gate: glitch-free clock gate at the output of a processor's main PLL.
//
// The "on" command of the clock-gate-on-abort scheme is applied to the
// output of the processor's always-running main PLL: while `en` is low the
// gated clock that feeds the core, I/O and cache clock domains stays low.
// This is the usual latch-and-AND integrated clock gate: `en` is captured by
// a latch that is transparent while clk is low, so the gated clock can only
// start or stop at a rising edge and never produces a short pulse. The
// latch is intended; it is the standard structure of such a cell. The cell
// structure is this design's own choice; the design only says where the
// gate sits. A synthesis flow would map this module onto the library's
// clock-gating cell.
module clk_gate (
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
