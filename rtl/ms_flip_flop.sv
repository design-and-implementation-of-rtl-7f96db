// ms_flip_flop -- master-slave flip-flop with separately driven master and
// slave latch clocks.
//
// Two level-sensitive latches in series: the master latch is transparent
// while `mclk` is high, the slave latch while `sclk` is high. Driven with
// mclk = ~CLK and sclk = CLK it is an ordinary rising-edge flip-flop. The
// timing-error-tolerant stage drives mclk with the master clock CM from the
// master clock generator, which can reopen the master latch during the high
// clock phase so late data passes straight to Q; the time-borrowed stage is
// driven by CLK_TB.
// Splitting the flip-flop into master and slave with their own clock pins
// follows the design description; the latch polarities are this design's
// reading of it (master open on a high master clock, slave open on a high
// slave clock).
//
// Interface: d, mclk, sclk, q. Timing: q changes only while sclk is high.
// The two latches are intentional: this block is a latch pair by design.
module ms_flip_flop (
  input  logic d,
  input  logic mclk,
  input  logic sclk,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic qm;  // master latch node

  // master latch
  always_latch begin
    if (mclk) qm = d;
  end

  // slave latch
  always_latch begin
    if (sclk) q = qm;
  end
endmodule
