// sem_clock_control: global error recovery for a pipeline of SEM cells.
//
// Input is the OR over the pipeline of (Error and not Benign), the one SEM
// case that needs recovery (R1 corrupted, Table I case II). The state
// machine samples it at the falling edge of CLK1, when the three samples of
// the cycle are taken (requires Phi1 + Phi2 < T/2). On a recovery the next
// cycle is a global stall with LBkup high: only CLK1 runs, and every SEM
// cell reloads R1 from R3, which repairs the corrupted R1 and leaves all
// others unchanged; CLK2 and CLK3 are held so R2 and R3 keep their good
// values. One cycle of penalty, as in the document. Cases with Benign = 1
// are false positives and cause nothing.
//
// `commit` (sampled at the falling edge of CLK1) says the current values of
// the R1 registers are final: in a normal cycle without a recovery, and
// after the repair cycle. `recovery` is high during the repair cycle. The
// clock gating and the state machine clocking are this design's choices,
// as in stem_clock_control; the latches are the clock gates. rst_n is
// asynchronous, active low; all clocks run during reset.
module sem_clock_control
  import sem_pkg::*;
(
  input  logic       clk1_g,
  input  logic       clk2_g,
  input  logic       clk3_g,
  input  logic       rst_n,
  input  logic       global_recover, // OR of (Error and not Benign)
  output logic       clk1_p,
  output logic       clk2_p,
  output logic       clk3_p,
  output logic       load_backup,    // LBkup
  output logic       commit,
  output logic       recovery,
  output sem_state_e state
);

  logic en23;

  always_ff @(negedge clk1_g or negedge rst_n) begin
    if (!rst_n)                                 state <= SEM_RUN;
    else if (state == SEM_RUN && global_recover) state <= SEM_BACKUP;
    else                                        state <= SEM_RUN;
  end

  assign load_backup = (state == SEM_BACKUP);
  assign recovery    = load_backup;
  assign commit      = rst_n && ((state == SEM_BACKUP) ||
                                ((state == SEM_RUN) && !global_recover));
  assign en23        = !rst_n || (state == SEM_RUN);

  assign clk1_p = clk1_g;   // R1 is clocked in every cycle
  clock_gate u_cg2 (.clk(clk2_g), .en(en23), .gclk(clk2_p));
  clock_gate u_cg3 (.clk(clk3_g), .en(en23), .gclk(clk3_p));

endmodule
