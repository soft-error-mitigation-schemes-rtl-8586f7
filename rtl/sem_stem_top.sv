// sem_stem_top: the two soft-error mitigated arithmetic pipelines.
//
// Side by side, each with its own clocks, operands and results:
//  * STEM side: stem_arith_pipeline + stem_clock_control + overclock_
//    controller. The pipeline may be overclocked; timing errors and soft
//    errors in R1/R2 roll every register back to its R3 checkpoint
//    (three-cycle penalty), a soft error in R3 alone refreshes R3 (one
//    cycle). The overclock controller counts recoveries per sampling
//    interval and outputs the clock step `oc_step` for the external clock
//    generator: period = T_Max - oc_step * (T_Max - T_Min) / 32.
//  * SEM side: sem_arith_pipeline + sem_clock_control, run at the
//    worst-case period; a corrupted R1 costs one stalled cycle.
// The clock generator that makes the three phase-shifted clocks of each
// side (CLK1 at 0, CLK2 at Phi1, CLK3 at Phi1+Phi2) is outside: its clocks
// come in as stem_clk*_g and sem_clk*_g, and it must keep Phi1+Phi2 below
// half a period. Operand handshake on each side: the source shows an
// operand and moves to the next one at each falling edge of clk1 at which
// *_in_commit is high. *_out_valid strobes a result for one cycle.
// Counts of recoveries are visible through *_recovery (one cycle each) and
// the interval error count through oc_last_errors.
// The pipelines' hold padding defaults (3.5 ns STEM, 2.5 ns SEM) fit
// Phi1/Phi2 of 2/1 ns (STEM) and 1/1 ns (SEM); other phases need them
// changed in the pipeline modules.
module sem_stem_top
  import sem_pkg::*;
#(
  parameter int unsigned ADD_W           = 64,
  parameter int unsigned INTERVAL_CYCLES = 10000,
  parameter int unsigned TARGET_PERCENT  = 1
) (
  input  logic                 rst_n,
  // STEM side
  input  logic                 stem_clk1_g,
  input  logic                 stem_clk2_g,
  input  logic                 stem_clk3_g,
  input  oc_mode_e             oc_mode,
  input  logic                 stem_in_valid,
  input  logic [ADD_W-1:0]     stem_in_a,
  input  logic [ADD_W-1:0]     stem_in_b,
  output logic                 stem_in_commit,
  output logic                 stem_out_valid,
  output logic [ADD_W-1:0]     stem_out_data,
  output logic                 stem_load_backup,
  output logic                 stem_load_panic,
  output logic                 stem_recovery,
  output logic [2:0]           stem_stage_error, // in_reg, s1_reg, s2_reg
  output logic [2:0]           stem_stage_panic,
  output logic [$clog2(OC_STEPS+1)-1:0]         oc_step,
  output logic [$clog2(INTERVAL_CYCLES+1)-1:0]  oc_last_errors,
  output logic                 oc_interval_done,
  output stem_state_e          stem_state,
  // SEM side
  input  logic                 sem_clk1_g,
  input  logic                 sem_clk2_g,
  input  logic                 sem_clk3_g,
  input  logic                 sem_in_valid,
  input  logic [ADD_W-1:0]     sem_in_a,
  input  logic [ADD_W-1:0]     sem_in_b,
  output logic                 sem_in_commit,
  output logic                 sem_out_valid,
  output logic [ADD_W-1:0]     sem_out_data,
  output logic                 sem_recovery,
  output logic [2:0]           sem_stage_error,
  output logic                 sem_benign,
  output sem_state_e           sem_state
);

  // ---------------- STEM side ----------------
  logic        st_clk1_p, st_clk2_p, st_clk3_p;
  logic        st_gerr, st_gpan;

  stem_clock_control u_stem_ctl (
    .clk1_g(stem_clk1_g), .clk2_g(stem_clk2_g), .clk3_g(stem_clk3_g),
    .rst_n(rst_n), .global_error(st_gerr), .global_panic(st_gpan),
    .clk1_p(st_clk1_p), .clk2_p(st_clk2_p), .clk3_p(st_clk3_p),
    .load_backup(stem_load_backup), .load_panic(stem_load_panic),
    .commit(stem_in_commit), .recovery(stem_recovery), .state(stem_state)
  );

  stem_arith_pipeline #(.ADD_W(ADD_W)) u_stem_pipe (
    .clk1_p(st_clk1_p), .clk2_p(st_clk2_p), .clk3_p(st_clk3_p),
    .clk1_g(stem_clk1_g), .rst_n(rst_n),
    .load_backup(stem_load_backup), .load_panic(stem_load_panic),
    .commit(stem_in_commit),
    .in_valid(stem_in_valid), .in_a(stem_in_a), .in_b(stem_in_b),
    .out_valid(stem_out_valid), .out_data(stem_out_data),
    .stage_error(stem_stage_error), .stage_panic(stem_stage_panic),
    .global_error(st_gerr), .global_panic(st_gpan)
  );

  overclock_controller #(
    .INTERVAL_CYCLES(INTERVAL_CYCLES), .TARGET_PERCENT(TARGET_PERCENT),
    .STEPS(OC_STEPS)
  ) u_oc (
    .clk(stem_clk1_g), .rst_n(rst_n), .mode(oc_mode),
    .recovery(stem_recovery), .step(oc_step),
    .last_errors(oc_last_errors), .interval_done(oc_interval_done)
  );

  // ---------------- SEM side ----------------
  logic        se_clk1_p, se_clk2_p, se_clk3_p;
  logic        se_lbkup, se_grec;
  logic [2:0]  se_sben;

  sem_clock_control u_sem_ctl (
    .clk1_g(sem_clk1_g), .clk2_g(sem_clk2_g), .clk3_g(sem_clk3_g),
    .rst_n(rst_n), .global_recover(se_grec),
    .clk1_p(se_clk1_p), .clk2_p(se_clk2_p), .clk3_p(se_clk3_p),
    .load_backup(se_lbkup), .commit(sem_in_commit),
    .recovery(sem_recovery), .state(sem_state)
  );

  sem_arith_pipeline #(.ADD_W(ADD_W)) u_sem_pipe (
    .clk1_p(se_clk1_p), .clk2_p(se_clk2_p), .clk3_p(se_clk3_p),
    .clk1_g(sem_clk1_g), .rst_n(rst_n), .load_backup(se_lbkup),
    .commit(sem_in_commit),
    .in_valid(sem_in_valid), .in_a(sem_in_a), .in_b(sem_in_b),
    .out_valid(sem_out_valid), .out_data(sem_out_data),
    .stage_error(sem_stage_error), .stage_benign(se_sben),
    .global_recover(se_grec)
  );

  assign sem_benign = |se_sben;

endmodule
