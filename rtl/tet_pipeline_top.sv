// tet_pipeline_top -- timing-error-tolerant pipeline with time borrowing
// and clock gating.
//
// Three single-bit master-slave flip-flops form a pipeline; the logic
// between them is outside this module (its ports q1 -> in2 and q2 -> in3 are
// brought out), because only its timing, not its function, matters here.
// The whole pipeline runs on the gated clock gclk = clk AND en.
//   Stage 1  ordinary rising-edge flip-flop (master ~gclk, slave gclk).
//   Stage 2  error-tolerant flip-flop: a transition detector watches in2;
//            an input edge arriving after the rising clock edge produces an
//            error pulse, the master clock generator turns it into a high
//            pulse on CM, the master latch reopens while the slave is still
//            transparent, and the late value reaches q2 before gclk falls.
//   Stage 3  flip-flop clocked by CLK_TB from the time-borrowing circuit: in
//            the cycle after a stage-2 correction its capture edge comes
//            TB_DELAY_PS late, so the late-launched data still gets in.
// Requirements for correct operation (as in the design description, the
// scheme is for paths whose delay exceeds half the clock period): every
// path's shortest delay must exceed half the period plus the error-pulse
// width, a stage-2 input may arrive at most half a period (less the
// latch delay) after the rising edge, and a stage-3 input at most
// TB_DELAY_PS late; en must only change while clk is low.
// The structure follows the design description; the two delay values and
// the reset are this design's own choices.
//
// Timing: q1/q2/q3 change on the rising gclk edge; q2 may change later
// within the high phase when it is corrected; q3 may change TB_DELAY_PS
// after the rising edge in a borrowing cycle. Outputs gclk, er, cm, clk_tb,
// borrow and cm_sr expose the internal clocks and flags for observation.
module tet_pipeline_top #(
  parameter int unsigned TD_DELAY_PS = 500,   // error pulse width
  parameter int unsigned TB_DELAY_PS = 3000   // borrowed time at stage 3
) (
  input  logic clk,
  input  logic en,
  input  logic rst,
  input  logic d,
  output logic q1,
  input  logic in2,
  output logic q2,
  input  logic in3,
  output logic q3,
  output logic gclk,
  output logic er,
  output logic cm,
  output logic clk_tb,
  output logic borrow,
  output logic cm_sr
);
  timeunit 1ps;
  timeprecision 1ps;

  clock_gate u_cg (
    .clk (clk),
    .en  (en),
    .gclk(gclk)
  );

  ms_flip_flop u_ff1 (
    .d   (d),
    .mclk(~gclk),
    .sclk(gclk),
    .q   (q1)
  );

  transition_detector #(.DELAY_PS(TD_DELAY_PS)) u_td (
    .in_d(in2),
    .er  (er)
  );

  master_clock_gen u_mcg (
    .er (er),
    .clk(gclk),
    .cm (cm)
  );

  ms_flip_flop u_ff2 (
    .d   (in2),
    .mclk(cm),
    .sclk(gclk),
    .q   (q2)
  );

  time_borrow_circuit #(.DELAY_PS(TB_DELAY_PS)) u_tbc (
    .clk   (gclk),
    .cm    (cm),
    .rst   (rst),
    .clk_tb(clk_tb),
    .borrow(borrow),
    .cm_sr (cm_sr)
  );

  ms_flip_flop u_ff3 (
    .d   (in3),
    .mclk(~clk_tb),
    .sclk(clk_tb),
    .q   (q3)
  );
endmodule
