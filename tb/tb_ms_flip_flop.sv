// tb_ms_flip_flop -- self-checking testbench for the master-slave
// flip-flop. Part 1 drives it as a rising-edge flip-flop (master clock =
// inverted clock) with data changing in both clock phases and checks that q
// only takes the value present at the rising edge. Part 2 reopens the
// master latch with a short pulse in the high phase, as the master clock
// generator does, and checks that the late data then reaches q.
module tb_ms_flip_flop;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HALF = 5000;
  logic d = 1'b0, mclk = 1'b1, sclk = 1'b0, q;
  int checks = 0, failures = 0;

  ms_flip_flop dut (.d(d), .mclk(mclk), .sclk(sclk), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic captured;
    // part 1: ordinary rising-edge operation
    for (int i = 0; i < 50; i++) begin
      // low phase: master open, slave closed
      d = 1'($urandom_range(0, 1));
      #(HALF / 2);
      d = 1'($urandom_range(0, 1));
      #(HALF / 2);
      captured = d;
      mclk = 1'b0; sclk = 1'b1;            // rising edge
      #10;
      check(q, captured, "capture at rising edge");
      d = ~d;                              // change in high phase is ignored
      #(HALF - 10);
      check(q, captured, "hold through high phase");
      sclk = 1'b0; mclk = 1'b1;            // falling edge
      #10;
      check(q, captured, "hold after falling edge");
      #(HALF - 10);
    end
    // part 2: master reopened by a pulse during the high phase
    for (int i = 0; i < 50; i++) begin
      d = 1'($urandom_range(0, 1));
      #(HALF);
      captured = d;
      mclk = 1'b0; sclk = 1'b1;
      #100;
      check(q, captured, "early value");
      d = ~captured;                       // late data
      #($urandom_range(100, HALF - 1500));
      check(q, captured, "late data blocked without pulse");
      mclk = 1'b1;                         // recovery pulse
      #400;
      mclk = 1'b0;
      #10;
      check(q, ~captured, "late data passed by pulse");
      sclk = 1'b0; mclk = 1'b1;
      #10;
      check(q, ~captured, "corrected value held");
      #(HALF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
