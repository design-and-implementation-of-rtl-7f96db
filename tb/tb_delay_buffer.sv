// tb_delay_buffer -- self-checking testbench for the delay_buffer model.
// Drives random edges and a pulse and checks that the output keeps
// its old value just before the programmed delay and follows the input
// just after it.
module tb_delay_buffer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 700;
  logic a = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  delay_buffer #(.DELAY_PS(DLY)) dut (.a(a), .y(y));

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
    logic prev;
    #(2 * DLY);
    check(y, 1'b0, "initial value");
    for (int i = 0; i < 40; i++) begin
      prev = a;
      a = ~a;
      #(DLY - 1);
      check(y, prev, "before delay");
      #2;
      check(y, a, "after delay");
      #($urandom_range(50, 1500));
    end
    // a pulse longer than the delay comes out intact, shifted by the delay
    #(2 * DLY);
    prev = a;
    a = ~a;
    #(DLY + 300);
    a = prev;
    #1;
    check(y, ~prev, "pulse start seen");
    #(DLY - 2);
    check(y, ~prev, "pulse still high");
    #2;
    check(y, prev, "pulse over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
