// clock_gate -- AND-gate clock gating.
//
// The gated clock is CLK AND EN: while EN is low the downstream flip-flops
// see no clock edges and hold their state, saving the dynamic power of the
// clock network and of the registers. A plain two-input AND gate is what the
// design description uses; as with any AND gate, EN must only change while
// CLK is low, otherwise the gated clock can glitch (no enable latch is
// added, to keep to the described circuit).
//
// Interface: clk, en, gclk. Purely combinational.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  timeunit 1ps;
  timeprecision 1ps;

  assign gclk = clk & en;
endmodule
