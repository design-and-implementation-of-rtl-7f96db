// tb_time_borrow_circuit -- self-checking testbench for the time-borrowing
// clock circuit. A free-running clock drives it; the master clock is formed
// as ~clk | er with short error pulses placed in the high phase of random
// cycles. A reference model predicts, for every cycle, whether the rising
// edge of CLK_TB is delayed: the cycle after an error is a borrowing cycle,
// except that an error inside a borrowing cycle is not registered. The
// testbench checks the position of every CLK_TB rising edge, that CLK_TB
// falls with CLK, the borrow flag, and the asynchronous reset.
module tb_time_borrow_circuit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HALF = 10_000;
  localparam int unsigned DLY  = 3000;
  localparam int          N    = 200;

  logic clk = 1'b0, er = 1'b0, rst = 1'b1;
  logic cm, clk_tb, borrow, cm_sr;
  int checks = 0, failures = 0;
  int n_borrow = 0, n_ignored = 0, n_plain = 0;

  assign cm = er | ~clk;

  time_borrow_circuit #(.DELAY_PS(DLY)) dut (
    .clk(clk), .cm(cm), .rst(rst), .clk_tb(clk_tb), .borrow(borrow), .cm_sr(cm_sr)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(2 * HALF * (N + 20));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bexp;      // borrow expected in the current cycle
    logic err_now;
    int   when;
    // reset for two cycles
    for (int i = 0; i < 2; i++) begin
      #(HALF) clk = 1'b1;
      #(HALF) clk = 1'b0;
    end
    #1;
    check(borrow, 1'b0, "borrow after reset");
    rst = 1'b0;
    bexp = 1'b0;
    for (int i = 0; i < N; i++) begin
      err_now = ($urandom_range(0, 2) == 0);
      #(HALF - 1);
      clk = 1'b1;                                   // rising edge
      #1;
      check(borrow, bexp, "borrow flag at rising edge");
      check(clk_tb, ~bexp, "clk_tb just after clk rise");
      #(DLY - 2);
      check(clk_tb, ~bexp, "clk_tb just before delayed rise");
      #2;
      check(clk_tb, 1'b1, "clk_tb high after delay");
      if (bexp) n_borrow++; else n_plain++;
      if (err_now) begin
        when = $urandom_range(100, HALF - DLY - 1000);
        #(when);
        er = 1'b1;
        #400;
        er = 1'b0;
        #(HALF - DLY - when - 400 - 1);
      end else begin
        #(HALF - DLY - 1);
      end
      clk = 1'b0;                                   // falling edge
      #1;
      check(clk_tb, 1'b0, "clk_tb falls with clk");
      if (err_now && bexp) n_ignored++;
      bexp = err_now && !bexp;
      check(borrow, bexp, "borrow flag after falling edge");
    end
    // asynchronous reset clears a pending borrow
    #(HALF - 1) clk = 1'b1;
    #100 er = 1'b1;
    #400 er = 1'b0;
    #(HALF - 500) clk = 1'b0;
    #10;
    check(borrow, ~bexp, "borrow set before reset test");
    rst = 1'b1;
    #10;
    check(borrow, 1'b0, "reset clears borrow");
    if (n_borrow == 0 || n_ignored == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL coverage borrow=%0d ignored=%0d plain=%0d", n_borrow, n_ignored, n_plain);
    end
    $display("borrowing cycles=%0d ignored errors=%0d plain cycles=%0d", n_borrow, n_ignored, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
