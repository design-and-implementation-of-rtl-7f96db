// time_borrow_circuit -- clock generator for the stage after the
// error-correcting flip-flop (time borrowing).
//
// When the stage-2 flip-flop corrects late data, its output changes late in
// the high clock phase, so the data it launches into the next combinational
// block also arrives late at the stage-3 flip-flop. This circuit gives that
// flip-flop a later capture edge for exactly one cycle:
//   * set = CM AND CLK is high only when the master clock is raised by an
//     error pulse during the high clock phase; it sets an SR latch made of
//     two cross-coupled NOR gates (output CM_SR);
//   * a D flip-flop clocked by CLKB (inverted CLK, i.e. the falling edge)
//     copies CM_SR to Q; Q feeds back to the NOR latch and clears it;
//   * a delay buffer makes CLKD from CLK, and CLKDD = CLK AND CLKD, a clock
//     whose rising edge comes DELAY_PS after CLK's and which falls with CLK;
//   * a 2:1 multiplexer outputs CLK_TB = CLK when Q = 0 and CLKDD when Q = 1.
// Q rises at the falling edge that ends the erroneous cycle and falls at the
// next falling edge, so exactly the next rising edge is delayed. Both
// switches of the multiplexer happen while CLK and CLKDD are low, so CLK_TB
// does not glitch.
// The SR latch, the falling-edge D flip-flop with its Q feedback, the delay
// buffer, the CLKDD gate and the multiplexer (0 input = CLK) follow the
// design description. The two gate functions (set = CM AND CLK,
// CLKDD = CLK AND CLKD) are this design's reading of what the circuit must
// do, as is the use of the flip-flop's RESET pin (and the latch clear) for
// the global reset; its SET pin is unused. Because Q resets the latch and
// the reset input dominates, an error in the cycle directly after a
// borrowing cycle is not registered.
//
// Interface: clk (gated system clock), cm (master clock from the master
// clock generator), rst (asynchronous, active high), clk_tb (clock for the
// stage-3 flip-flop), borrow (the flip-flop's Q: CLK_TB is the delayed clock),
// cm_sr (latch output, for observation).
// The SR latch is an intentional latch. A synthesis tool drops the delay
// of the CLKD buffer (CLKDD then equals CLK); in a netlist it has to be a
// hand-placed delay cell.
module time_borrow_circuit #(
  parameter int unsigned DELAY_PS = 3000
) (
  input  logic clk,
  input  logic cm,
  input  logic rst,
  output logic clk_tb,
  output logic borrow,
  output logic cm_sr
);
  timeunit 1ps;
  timeprecision 1ps;

  logic set_sr;
  logic clkb;
  logic clkd;
  logic clkdd;

  assign set_sr = cm & clk;

  // NOR-NOR set/reset latch, reset (Q feedback) dominant
  always_latch begin
    if (borrow || rst)  cm_sr = 1'b0;
    else if (set_sr)    cm_sr = 1'b1;
  end

  // D flip-flop on CLKB with asynchronous RESET
  assign clkb = ~clk;
  always_ff @(posedge clkb or posedge rst) begin
    if (rst) borrow <= 1'b0;
    else     borrow <= cm_sr;
  end

  delay_buffer #(.DELAY_PS(DELAY_PS)) u_dly (
    .a(clk),
    .y(clkd)
  );

  assign clkdd  = clk & clkd;
  assign clk_tb = borrow ? clkdd : clk;
endmodule
