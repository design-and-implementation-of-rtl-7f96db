// tb_tet_pipeline_top -- end-to-end testbench of the timing-error-tolerant
// pipeline, at the design's default delays.
//
// The two combinational blocks between the stages are modelled here as
// inverters with a delay chosen per launch (their function is not part of
// the design): in2 = ~q1 and in3 = ~q2. The clock period is 20 ns.
//   * Normal launches take between half a period (plus margin) and one
//     period, so the data settles while the clock is low.
//   * Now and then a stage-1 launch is made "late": it reaches in2 0.2 to
//     2.5 ns after the next rising edge. Stage 2 must correct q2 within the
//     high phase (transition detector + master clock generator).
//   * The value stage 2 then launches late reaches in3 late as well when the
//     second path is slow; stage 3 must still capture it, thanks to the
//     delayed CLK_TB edge of the time-borrowing circuit.
//   * The enable is dropped in random cycles (changed only in the low
//     phase); gated cycles must leave every stage unchanged.
// Late launches are placed only where the description's scheme can correct
// them: the following two cycles are enabled and the previous launch was
// not late (an error inside a borrowing cycle is not registered).
// Reference: with D(n) the input at gated edge n, after edge n the outputs
// must be q1 = D(n), q2 = ~D(n-1), q3 = D(n-2); this is checked at the end
// of every high phase. The borrow flag is checked against the cycles in
// which an error pulse occurred during the high phase. Each mechanism
// (stage-2 correction, borrowed stage-3 capture, borrowing cycle, gated
// cycle) must occur at least once.
module tb_tet_pipeline_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HALF = 10_000;
  localparam int unsigned T    = 2 * HALF;
  localparam int          N    = 400;

  logic clk = 1'b0, en = 1'b1, rst = 1'b1, d = 1'b0;
  logic q1, q2, q3, in2, in3;
  logic gclk, er, cm, clk_tb, borrow, cm_sr;

  int checks = 0, failures = 0;
  int n_corrected = 0, n_borrowed_capture = 0, n_borrow_cycles = 0;
  int n_gated = 0, n_late_launch = 0;

  int unsigned d1_cur = 15_000, d2_cur = 15_000;
  time in3_changed = 0;
  logic er_in_high = 1'b0;

  tet_pipeline_top dut (
    .clk(clk), .en(en), .rst(rst), .d(d),
    .q1(q1), .in2(in2), .q2(q2), .in3(in3), .q3(q3),
    .gclk(gclk), .er(er), .cm(cm), .clk_tb(clk_tb), .borrow(borrow), .cm_sr(cm_sr)
  );

  // combinational block 1: inverter with the delay chosen for this launch
  always @(q1) begin : comb1
    automatic logic v = ~q1;
    automatic int unsigned dl = d1_cur;
    fork
      begin
        #(dl);
        in2 = v;
      end
    join_none
  end

  // combinational block 2: inverter with the delay chosen for this launch
  always @(q2) begin : comb2
    automatic logic v = ~q2;
    automatic int unsigned dl = d2_cur;
    fork
      begin
        #(dl);
        in3 = v;
        in3_changed = $time;
      end
    join_none
  end

  // an error pulse while the gated clock is high marks a stage-2 correction
  always @(posedge er) if (gclk) er_in_high = 1'b1;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(T * (N + 20));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_plan [N + 3];
    logic dhist   [N + 1];
    int   n;                // index of the last gated rising edge
    logic late, late_prev;
    logic borrow_exp, had_err;
    logic q2_early, in3_early, exp_q3;
    time  t_rise;

    foreach (en_plan[i]) en_plan[i] = (i < 6) ? 1'b1 : ($urandom_range(0, 5) != 0);
    n = -1;
    late_prev  = 1'b0;
    borrow_exp = 1'b0;
    #1;
    in2 = ~q1;
    in3 = ~q2;

    for (int c = 0; c < N; c++) begin
      // ---- low phase: set enable, data and the delays of this launch
      en = en_plan[c];
      d  = 1'($urandom_range(0, 1));
      if (c == 2) rst = 1'b0;
      late = 1'b0;
      if (en_plan[c] && c >= 6 && en_plan[c + 1] && en_plan[c + 2] && !late_prev)
        late = ($urandom_range(0, 2) == 0);
      d1_cur = late ? T + $urandom_range(200, 2500) : $urandom_range(HALF + 500, T - 1000);
      d2_cur = late_prev ? $urandom_range(T - 2500, T - 1000)
                         : $urandom_range(HALF + 500, T - 1000);
      #(HALF - 1);

      // ---- rising edge
      clk = 1'b1;
      t_rise = $time;
      if (en_plan[c]) begin
        n++;
        dhist[n] = d;
        if (late) n_late_launch++;
        had_err    = er_in_high;
        er_in_high = 1'b0;
        if (c > 2) begin
          borrow_exp = had_err && !borrow_exp;
        end
        late_prev = late;
      end else begin
        n_gated++;
        late_prev = 1'b0;
      end
      #1;
      q2_early  = q2;
      in3_early = in3;
      if (en_plan[c] && c > 3) begin
        check(borrow, borrow_exp, "borrow flag");
        if (borrow) n_borrow_cycles++;
      end
      #(HALF - 2);

      // ---- end of high phase: every stage must hold the reference value
      if (n >= 3) begin
        check(q1, dhist[n], "stage 1 output");
        check(q2, ~dhist[n - 1], "stage 2 output");
        exp_q3 = dhist[n - 2];
        check(q3, exp_q3, "stage 3 output");
        if (en_plan[c] && q2_early != q2 && q2 == ~dhist[n - 1]) n_corrected++;
        if (en_plan[c] && borrow && in3_changed > t_rise && in3_early != exp_q3 && q3 == exp_q3)
          n_borrowed_capture++;
      end
      #1;
      clk = 1'b0;
    end

    $display("late launches=%0d stage-2 corrections=%0d borrowing cycles=%0d borrowed captures=%0d gated cycles=%0d",
             n_late_launch, n_corrected, n_borrow_cycles, n_borrowed_capture, n_gated);
    if (n_corrected == 0)        begin failures++; $display("FAIL no stage-2 correction happened"); end
    if (n_borrow_cycles == 0)    begin failures++; $display("FAIL no borrowing cycle happened"); end
    if (n_borrowed_capture == 0) begin failures++; $display("FAIL no borrowed stage-3 capture happened"); end
    if (n_gated == 0)            begin failures++; $display("FAIL no gated cycle happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
