// tb_sem_clock_control: self-checking test of the SEM recovery control.
//
// Clocks come from the clock generator model. In random cycles the test
// raises the global recover signal (Error and not Benign) after the CLK3
// edge, as the SEM cells would, and counts the pulses of the gated clocks.
// An independent model gives the expected behaviour: the cycle after a
// recovery request is a stall with LBkup high in which only CLK1 pulses;
// `commit` is low in the faulty cycle and high in the repair cycle, so
// each recovery costs exactly one cycle.
module tb_sem_clock_control;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  logic clk1_g, clk2_g, clk3_g;
  logic rst_n = 0, global_recover = 0;
  logic clk1_p, clk2_p, clk3_p, load_backup, commit, recovery;
  sem_state_e state;
  int unsigned period_ps;

  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n3 = 0;
  int n_rec = 0, n_commit = 0, n_cycles = 0;

  clock_generator_model #(.PHI1_PS(1000), .PHI2_PS(1000)) u_gen (
    .step(6'd0), .clk1(clk1_g), .clk2(clk2_g), .clk3(clk3_g),
    .period_ps(period_ps));
  sem_clock_control dut (.*);

  always @(posedge clk1_p) n1++;
  always @(posedge clk2_p) n2++;
  always @(posedge clk3_p) n3++;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #(9000 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;      // model: 0 run, 1 repair
    int o1, o2, o3;
    bit r;
    s = 0;
    repeat (3) @(posedge clk1_g);
    #100 rst_n = 1;
    @(posedge clk3_g);
    #200 o1 = n1; o2 = n2; o3 = n3;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(posedge clk1_g);
      #100 global_recover = 0;
      r = (s == 0) && ($urandom_range(0, 7) == 0);
      @(posedge clk3_g);
      #100 global_recover = r;
      #100;
      check(n1 - o1, 1, "CLK1 pulse");
      check(n2 - o2, (s == 0) ? 1 : 0, "CLK2 pulse");
      check(n3 - o3, (s == 0) ? 1 : 0, "CLK3 pulse");
      o1 = n1; o2 = n2; o3 = n3;
      check(int'(load_backup), int'(s == 1), "LBkup");
      check(int'(recovery),    int'(s == 1), "recovery");
      check(int'(commit),      int'(s == 1 || !r), "commit");
      n_cycles++;
      if (commit) n_commit++;
      if (s == 0 && r) begin s = 1; n_rec++; end
      else s = 0;
    end
    check(n_cycles - n_commit, n_rec, "one cycle lost per recovery");
    checks++;
    if (n_rec == 0) begin
      failures++;
      $display("FAIL: no recovery exercised");
    end
    $display("recoveries=%0d cycles=%0d committed=%0d", n_rec, n_cycles, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
