// transition_detector -- flags any transition on a flip-flop's data input.
//
// The data input `in_d` is inverted and passed through a delay buffer,
// giving `in_nd`, the complement of the input as it was DELAY_PS earlier.
// One AND gate sees (in_d, in_nd) and fires on a rising input; an AND gate
// with both inputs inverted sees the same pair and fires on a falling input.
// Their OR is the error pulse `er`, high for DELAY_PS after every edge of
// `in_d`. The structure (inverter, delay buffer, AND, bubbled AND, OR)
// follows the design description; the pulse width, i.e. DELAY_PS, is this
// design's own choice: it must be long enough to let the master latch of
// the protected flip-flop settle and short enough to avoid hold problems.
//
// Interface: in_d (data input of the protected flip-flop), er (error pulse).
// Timing: asynchronous; er rises with the input edge and falls DELAY_PS later.
// A synthesis tool drops the delay, which turns er into a constant 0: in a
// netlist the delay buffer has to be a hand-placed delay cell.
module transition_detector #(
  parameter int unsigned DELAY_PS = 500
) (
  input  logic in_d,
  output logic er
);
  timeunit 1ps;
  timeprecision 1ps;

  logic in_n;     // inverter output
  logic in_nd;    // inverted input after the delay buffer
  logic rise_p;   // pulse on a rising input edge
  logic fall_p;   // pulse on a falling input edge

  assign in_n = ~in_d;

  delay_buffer #(.DELAY_PS(DELAY_PS)) u_dly (
    .a(in_n),
    .y(in_nd)
  );

  assign rise_p = in_d & in_nd;      // AND gate
  assign fall_p = ~in_d & ~in_nd;    // AND gate with inverted inputs
  assign er     = rise_p | fall_p;   // OR gate
endmodule
