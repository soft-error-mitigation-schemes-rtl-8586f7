// stem_cell: one-bit Soft and Timing Error Mitigation (STEM) register cell.
//
// Like the SEM cell, the data input is sampled by R1 (CLK1), R2 (CLK2, Phi1
// later) and R3 (CLK3, Phi1+Phi2 later), and R1 is forwarded speculatively.
// Here the clock is allowed to be shorter than the longest path (over-
// clocking): R1 may catch a late value, while R2, sampled Phi1 later, is
// timing safe. R3 is a one-cycle checkpoint: the clock control suppresses
// its clock edge in any cycle in which some cell flagged an error, so it
// keeps the last value known to be good.
//   error = Q1 != Q2                  (R1 or R2 hit: timing or soft error)
//   panic = (Q2 != Q3) and not error  (only R3 hit)
// Recovery, driven from outside by the clock control:
//   load_backup = 1: R1 and R2 reload from R3 on their next edges;
//   load_panic  = 1: R3 reloads from R2 on its next edge.
// The multiplexers, the comparisons and the panic qualification by error
// follow the document's cell drawing and its Table II. No reset.
module stem_cell (
  input  logic clk1,        // phase 0 clock for R1 (gated by clock control)
  input  logic clk2,        // phase Phi1 clock for R2 (gated)
  input  logic clk3,        // phase Phi1+Phi2 clock for R3 (gated)
  input  logic data_in,     // output of the combinational logic of the stage
  input  logic load_backup, // R1, R2 <= R3
  input  logic load_panic,  // R3 <= R2
  output logic data_out,    // speculative output, R1
  output logic error,       // R1 and R2 disagree
  output logic panic        // only R3 disagrees with R2
);

  logic q1, q2, q3;

  always_ff @(posedge clk1) q1 <= load_backup ? q3 : data_in;
  always_ff @(posedge clk2) q2 <= load_backup ? q3 : data_in;
  always_ff @(posedge clk3) q3 <= load_panic  ? q2 : data_in;

  assign data_out = q1;
  assign error    = q1 ^ q2;
  assign panic    = (q2 ^ q3) & ~error;

endmodule
