// sem_reg: W-bit pipeline-stage register built from SEM cells.
//
// Every bit is a sem_cell sharing the three clocks and the LBkup control.
// The per-bit signals are OR-ed into stage signals for the clock control:
//   stage_recover = OR over bits of (error and not benign): some R1 holds a
//                   corrupted value and must be reloaded (Table I case II);
//   stage_error   = OR of error, stage_benign = OR of benign, reported for
//                   error logging (false positives included).
// OR-ing the cell signals per stage follows the document's pipeline
// description; reporting the raw error/benign ORs is this design's addition
// for logging. Timing is that of sem_cell.
module sem_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         load_backup,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         stage_recover,
  output logic         stage_error,
  output logic         stage_benign
);

  logic [W-1:0] err, ben;

  for (genvar i = 0; i < W; i++) begin : g_bit
    sem_cell u_cell (
      .clk1       (clk1),
      .clk2       (clk2),
      .clk3       (clk3),
      .data_in    (d[i]),
      .load_backup(load_backup),
      .data_out   (q[i]),
      .error      (err[i]),
      .benign     (ben[i])
    );
  end

  assign stage_recover = |(err & ~ben);
  assign stage_error   = |err;
  assign stage_benign  = |ben;

endmodule
