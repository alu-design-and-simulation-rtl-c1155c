// clock_gate: gated clock for one ALU functional unit.
//
// The gated clock is the clock ANDed with the unit's enable. The enable comes
// from a flip-flop that changes just after the rising clock edge, while the
// clock is still high; a bare AND would then pass a shortened pulse. The
// enable is therefore held in a latch that is transparent only while the
// clock is low (the usual integrated clock-gating cell), so gclk only ever
// carries whole clock pulses. The latch is intentional and is the one latch
// warning the tools report for this module; this latch is the design's
// choice, the AND is the ALU's clock-gating scheme.
//
// Timing: an enable that rises at clock edge k opens the gate for edge k+1
// and every following edge until it falls.
module clock_gate (
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
