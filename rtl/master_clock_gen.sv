// master_clock_gen -- produces the master-latch clock CM of the protected
// flip-flop.
//
// CM = Er OR (NOT CLK). With no error, CM is the inverted clock, so the
// master latch is transparent while the clock is low and the flip-flop is an
// ordinary rising-edge master-slave flip-flop. When the transition detector
// reports a late input edge while the clock is high, CM is pulled high for
// the length of the error pulse, reopening the master latch while the slave
// is still transparent, so the late data reaches Q before the clock falls.
// The gate structure (one OR gate, inverter on the clock input) follows the
// design description.
//
// Interface: er (error pulse), clk (system clock, after clock gating),
// cm (master clock). Purely combinational.
module master_clock_gen (
  input  logic er,
  input  logic clk,
  output logic cm
);
  timeunit 1ps;
  timeprecision 1ps;

  assign cm = er | ~clk;
endmodule
