// tb_stem_clock_control: self-checking test of the STEM recovery control.
//
// Three phase-shifted clocks come from the clock generator model. Each
// cycle the test may raise the global Error (after the CLK2 edge, as the
// STEM cells would) or the global Panic, and counts the pulses of the three
// gated clocks. An independent model of the recovery sequence gives, per
// cycle, which clocks must pulse and the expected Load_Backup, Load_Panic,
// commit and recovery outputs: an Error shields CLK3 at once, then one
// Load_Backup cycle (CLK1, CLK2 only) and two cycles with no clock; a
// Panic gives one Load_Panic cycle (CLK3 only). Penalties (3 and 1 lost
// cycles) are checked by counting committed cycles.
module tb_stem_clock_control;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  logic clk1_g, clk2_g, clk3_g;
  logic rst_n = 0, global_error = 0, global_panic = 0;
  logic clk1_p, clk2_p, clk3_p, load_backup, load_panic, commit, recovery;
  stem_state_e state;
  int unsigned period_ps;

  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n3 = 0;
  int n_err = 0, n_pan = 0, n_commit = 0, n_cycles = 0;

  clock_generator_model u_gen (.step(6'd0), .clk1(clk1_g), .clk2(clk2_g),
                               .clk3(clk3_g), .period_ps(period_ps));
  stem_clock_control dut (.*);

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
    int s;      // model: 0 run, 1 backup, 2 stall, 3 panic
    int stall;
    int o1, o2, o3;
    bit e, p;
    s = 0; stall = 0;
    repeat (3) @(posedge clk1_g);
    #100 rst_n = 1;
    @(posedge clk3_g);
    #200 o1 = n1; o2 = n2; o3 = n3;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(posedge clk1_g);
      #100 global_error = 0; global_panic = 0;
      e = 0; p = 0;
      if (s == 0) begin
        e = ($urandom_range(0, 9) == 0);
        p = ($urandom_range(0, 9) == 0);
      end
      @(posedge clk2_g);
      #100 global_error = e; global_panic = p;
      @(posedge clk3_g);
      #200;
      // pulses of this cycle: counted since the previous check point
      check(n1 - o1, (s == 0 || s == 1) ? 1 : 0, "CLK1 pulse");
      check(n2 - o2, (s == 0 || s == 1) ? 1 : 0, "CLK2 pulse");
      check(n3 - o3, ((s == 0 && !e) || s == 3) ? 1 : 0, "CLK3 pulse");
      o1 = n1; o2 = n2; o3 = n3;
      check(int'(load_backup), int'(s == 1), "load_backup");
      check(int'(load_panic),  int'(s == 3), "load_panic");
      check(int'(recovery),    int'(s == 1 || s == 3), "recovery");
      check(int'(commit),      int'(s == 0 && !e), "commit");
      n_cycles++;
      if (commit) n_commit++;
      case (s)
        0: if (e) begin s = 1; n_err++; end
           else if (p) begin s = 3; n_pan++; end
        1: begin s = 2; stall = 1; end
        2: if (stall == 0) s = 0; else stall--;
        3: s = 0;
        default: s = 0;
      endcase
    end
    // uncommitted cycles: the Error cycle itself plus 3 recovery cycles per
    // Error, 1 recovery cycle per Panic
    check(n_cycles - n_commit, n_err * 4 + n_pan * 1, "cycle penalty");
    checks++;
    if (n_err == 0 || n_pan == 0) begin
      failures++;
      $display("FAIL: no error or no panic recovery exercised");
    end
    $display("errors=%0d panics=%0d cycles=%0d committed=%0d",
             n_err, n_pan, n_cycles, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
