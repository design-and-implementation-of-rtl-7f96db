// tb_master_clock_gen -- self-checking testbench for the master clock
// generator: all four input combinations, compared with CM = Er | ~CLK.
module tb_master_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  logic er, clk, cm;
  int checks = 0, failures = 0;

  master_clock_gen dut (.er(er), .clk(clk), .cm(cm));

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        {er, clk} = 2'(v);
        #10;
        // master latch open in the low clock phase or during an error pulse
        exp = (clk == 1'b0) ? 1'b1 : er;
        checks++;
        if (cm !== exp) begin
          failures++;
          $display("FAIL er=%0b clk=%0b cm=%0b", er, clk, cm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
