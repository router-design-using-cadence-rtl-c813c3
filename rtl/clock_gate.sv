// clock_gate: integrated clock gate for one output FIFO.
//
// The router saves power by clocking only the FIFO that is being written or
// read; the other FIFOs keep their contents with their clock stopped. This
// is the usual latch-and-AND gate: the enable is captured by a latch that is
// transparent while clk is low, and gclk is clk AND the latched enable. An
// enable that changes while clk is high therefore cannot clip or glitch the
// clock pulse.
//
// Timing: en must be stable before the rising edge of clk it is meant to
// let through; gclk then carries that one pulse. The latch is intended and
// is the circuit warning a lint tool reports for this module; a cell library
// replaces the whole module with its clock-gating cell.
//
// Clock gating of the FIFOs is the power-saving method of the design; the
// latch-based structure is this design's own choice.
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
