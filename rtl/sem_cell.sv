// sem_cell: one-bit Soft Error Mitigation (SEM) register cell.
//
// The same data input is sampled three times per cycle by three registers
// clocked by phase-shifted copies of the same clock: R1 on CLK1, R2 on CLK2
// (Phi1 later) and R3 on CLK3 (Phi1+Phi2 later). R1 drives the cell output
// at once, so later stages compute speculatively on it and the voting is off
// the critical path. Two comparisons vote on the samples:
//   error  = Q1 != Q2     (valid after the CLK2 edge)
//   benign = Q2 != Q3     (valid after the CLK3 edge)
// Only error=1 with benign=0 (R1 alone corrupted, Table I case II) needs a
// recovery: with load_backup high, the next CLK1 edge reloads R1 from R3,
// while the clock control holds CLK2/CLK3 and every other register for that
// one cycle. error=1,benign=1 (R2 corrupted) and error=0,benign=1 (R3
// corrupted) need none.
//
// The R1 input multiplexer, the R3 source for the reload and both
// comparisons are as the document draws them. No reset: the cells start
// with whatever the first clock edges load, as registers of a pipeline do.
//
// Timing: Phi1, Phi2 >= the transient pulse width; the shortest logic path
// into data_in must exceed Phi1+Phi2; the period must exceed the longest path.
module sem_cell (
  input  logic clk1,        // phase 0 clock for R1
  input  logic clk2,        // phase Phi1 clock for R2
  input  logic clk3,        // phase Phi1+Phi2 clock for R3
  input  logic data_in,     // output of the combinational logic of the stage
  input  logic load_backup, // LBkup: R1 takes R3 instead of data_in
  output logic data_out,    // speculative output, R1
  output logic error,       // R1 and R2 disagree
  output logic benign       // R2 and R3 disagree
);

  logic q1, q2, q3;

  always_ff @(posedge clk1) q1 <= load_backup ? q3 : data_in;
  always_ff @(posedge clk2) q2 <= data_in;
  always_ff @(posedge clk3) q3 <= data_in;

  assign data_out = q1;
  assign error    = q1 ^ q2;
  assign benign   = q2 ^ q3;

endmodule
