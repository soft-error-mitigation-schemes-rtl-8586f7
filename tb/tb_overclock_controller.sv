// tb_overclock_controller: self-checking test of the error-rate driven
// clock step control, with a 200-cycle sampling interval (1 % = 2 errors).
// The test injects a chosen number of recoveries per interval and checks
// against a model: DYNOC steps up (faster) after an interval with rate
// below target and down otherwise, saturating at 0 and STEPS; NOOC pins
// step 0 (T_Max); MAXOC pins step STEPS (T_Min). The reported interval
// error count and the interval_done pulse period are checked too.
module tb_overclock_controller;
  import sem_pkg::*;
  localparam int INTERVAL = 200;
  localparam int STEPS = 32;

  logic clk = 0, rst_n = 0, recovery = 0;
  oc_mode_e mode = OC_DYNOC;
  logic [$clog2(STEPS+1)-1:0] step;
  logic [$clog2(INTERVAL+1)-1:0] last_errors;
  logic interval_done;

  int checks = 0, failures = 0;
  int exp_step = 0, n_up = 0, n_down = 0, n_sat = 0;

  overclock_controller #(.INTERVAL_CYCLES(INTERVAL), .TARGET_PERCENT(1),
                         .STEPS(STEPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // one interval with `nerr` recoveries spread over it
  task automatic interval(input int nerr);
    int placed = 0;
    // called right after a falling edge; each value is sampled by the
    // next rising edge
    for (int c = 0; c < INTERVAL; c++) begin
      recovery = (placed < nerr) && (c % 7 == 3);
      if (recovery) placed++;
      @(negedge clk);
    end
    check(int'(interval_done), 1, "interval_done");
    check(int'(last_errors), nerr, "last_errors");
    if (mode == OC_DYNOC) begin
      if (nerr * 100 < INTERVAL) begin
        if (exp_step < STEPS) begin exp_step++; n_up++; end else n_sat++;
      end else begin
        if (exp_step > 0) begin exp_step--; n_down++; end else n_sat++;
      end
    end
    check(int'(step), exp_step, "step");
  endtask

  initial begin : watchdog
    #(10 * INTERVAL * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // align: reset so that the interval starts with the first cycle
    @(negedge clk);
    rst_n = 1;
    // no errors: climb to the top and saturate
    for (int i = 0; i < STEPS + 2; i++) interval(i % 2);
    // rate at / above target: come down
    for (int i = 0; i < 10; i++) interval(2 + i % 3);
    // mixed
    for (int i = 0; i < 20; i++) interval($urandom_range(0, 3));
    // mode switches
    mode = OC_NOOC;  exp_step = 0;
    interval(0);
    mode = OC_MAXOC; exp_step = STEPS;
    interval(5);
    mode = OC_DYNOC;
    interval(5);
    checks++;
    if (n_up == 0 || n_down == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL: up=%0d down=%0d sat=%0d", n_up, n_down, n_sat);
    end
    $display("steps up=%0d down=%0d saturated=%0d", n_up, n_down, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
