// stem_clock_control: global error recovery for a pipeline of STEM cells.
//
// Inputs are the three generator clocks (CLK1 at phase 0, CLK2 at Phi1,
// CLK3 at Phi1+Phi2, all of period T) and the OR-ed global Error and Panic
// of the pipeline. Outputs are the gated pipeline clocks and the cell
// controls Load_Backup and Load_Panic.
//
// Within a cycle (document, Sec. III and IV):
//  * Error is known after the CLK2 edge. The CLK3 edge of the same cycle is
//    suppressed at once, so no R3 takes the suspect data (R3 "shielding").
//  * Error = 1: next cycle Load_Backup is high and CLK1/CLK2 reload R1/R2
//    from R3 (CLK3 held); then all clocks are held for RECOMP_CYCLES (2)
//    cycles so the logic has time to recompute: a three-cycle penalty.
//  * Error = 0 and Panic = 1: next cycle Load_Panic is high, CLK1/CLK2 are
//    held and CLK3 reloads R3 from R2: a one-cycle penalty.
//  * If Error = 1, Panic is not looked at.
//
// Implementation choices of this design: the state machine is clocked on
// the falling edge of CLK1 (time T/2), where both Error and Panic of the
// cycle are settled provided Phi1 + Phi2 < T/2; the clocks are stopped
// with latch-based clock gates (the latches in the circuit report are
// these gates). The cycles of the current group of pipeline captures are
// final when `commit` is high at that falling edge: the write buffer and
// the data source use it. `recovery` is high for exactly one cycle per
// recovery and feeds the error-rate counter. rst_n is asynchronous, active
// low; during reset all clocks run so the pipeline fills from its inputs.
module stem_clock_control
  import sem_pkg::*;
#(
  parameter int unsigned RECOMP_CYCLES = STEM_RECOMP_CYCLES
) (
  input  logic        clk1_g,       // generator clocks
  input  logic        clk2_g,
  input  logic        clk3_g,
  input  logic        rst_n,
  input  logic        global_error, // OR of all STEM Error signals
  input  logic        global_panic, // OR of all STEM Panic signals
  output logic        clk1_p,       // gated pipeline clocks
  output logic        clk2_p,
  output logic        clk3_p,
  output logic        load_backup,
  output logic        load_panic,
  output logic        commit,       // sampled at negedge clk1_g
  output logic        recovery,     // one cycle per recovery
  output stem_state_e state
);

  localparam int unsigned CW = (RECOMP_CYCLES > 1) ? $clog2(RECOMP_CYCLES) : 1;

  logic [CW-1:0] stall_cnt;
  logic          en12, en3;

  always_ff @(negedge clk1_g or negedge rst_n) begin
    if (!rst_n) begin
      state     <= STEM_RUN;
      stall_cnt <= '0;
    end else begin
      unique case (state)
        STEM_RUN: begin
          if (global_error)      state <= STEM_BACKUP;
          else if (global_panic) state <= STEM_PANIC;
        end
        STEM_BACKUP: begin
          if (RECOMP_CYCLES == 0) state <= STEM_RUN;
          else begin
            state     <= STEM_STALL;
            stall_cnt <= CW'(RECOMP_CYCLES - 1);
          end
        end
        STEM_STALL: begin
          if (stall_cnt == '0) state <= STEM_RUN;
          else                 stall_cnt <= stall_cnt - 1'b1;
        end
        STEM_PANIC: state <= STEM_RUN;
        default:    state <= STEM_RUN;
      endcase
    end
  end

  assign load_backup = (state == STEM_BACKUP);
  assign load_panic  = (state == STEM_PANIC);
  assign recovery    = load_backup | load_panic;
  assign commit      = rst_n && (state == STEM_RUN) && !global_error;

  // R1/R2 run in normal and load-backup cycles; R3 runs in normal cycles
  // without error (shielding) and in the load-panic cycle.
  assign en12 = !rst_n || (state == STEM_RUN) || (state == STEM_BACKUP);
  assign en3  = !rst_n || ((state == STEM_RUN) && !global_error) ||
                (state == STEM_PANIC);

  clock_gate u_cg1 (.clk(clk1_g), .en(en12), .gclk(clk1_p));
  clock_gate u_cg2 (.clk(clk2_g), .en(en12), .gclk(clk2_p));
  clock_gate u_cg3 (.clk(clk3_g), .en(en3),  .gclk(clk3_p));

endmodule
