// tb_transition_detector -- self-checking testbench for the transition
// detector. After every rising and every falling input edge the error
// output must be high for exactly the delay-buffer time, and it must stay
// low while the input is steady.
module tb_transition_detector;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 400;
  logic in_d = 1'b0;
  logic er;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0;

  transition_detector #(.DELAY_PS(DLY)) dut (.in_d(in_d), .er(er));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    #(3 * DLY);
    check(er, 1'b0, "quiet after start");
    for (int i = 0; i < 60; i++) begin
      in_d = ~in_d;
      if (in_d) rises++; else falls++;
      #1;
      check(er, 1'b1, "pulse start");
      #(DLY - 2);
      check(er, 1'b1, "pulse end");
      #2;
      check(er, 1'b0, "pulse over");
      gap = $urandom_range(10, 2000);
      #(gap);
      check(er, 1'b0, "steady input");
    end
    if (rises == 0 || falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
