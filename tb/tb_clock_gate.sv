// tb_clock_gate -- self-checking testbench for the AND clock gate: a
// free-running clock with the enable changed in the low phase; the gated
// clock must pulse exactly in the enabled cycles.
module tb_clock_gate;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int edges = 0, expected_edges = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) edges++;

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      en = 1'($urandom_range(0, 1));
      #500;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high in low phase"); end
      clk = 1'b1;
      if (en) expected_edges++;
      #500;
      checks++;
      if (gclk !== en) begin failures++; $display("FAIL gclk=%0b en=%0b", gclk, en); end
      clk = 1'b0;
    end
    checks++;
    if (edges != expected_edges) begin
      failures++;
      $display("FAIL edges %0d expected %0d", edges, expected_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
