// delay_buffer -- behavioural model of a delay-buffer cell (not synthesizable
// logic: kind = behavioural model).
//
// The timing-error-tolerant circuit relies on two delay buffers: one inside
// the transition detector, whose delay sets the width of the error pulse
// (and so of the recovery window of the stage-2 master latch), and one in
// the time-borrowing circuit, which produces the delayed clock CLKD. In
// silicon each is a chain of inverters/buffers sized for the wanted delay;
// here the cell is modelled as a transport delay of DELAY_PS picoseconds.
//
// Interface: a -> y, y follows a after DELAY_PS. Only pulses longer than
// the delay are relied upon by the circuit.
// The delay value is not given by the design description; the default is
// this model's own choice and is overridden by the instantiating block.
module delay_buffer #(
  parameter int unsigned DELAY_PS = 500
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) y = a;
endmodule
