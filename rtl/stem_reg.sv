// stem_reg: W-bit pipeline-stage register built from STEM cells.
//
// Every bit is a stem_cell sharing the three (gated) clocks and the
// Load_Backup / Load_Panic controls. As in the document, the error signals
// of all cells of a stage are OR-ed into the stage error; the panic signals
// are OR-ed the same way into the stage panic. Timing is that of stem_cell:
// stage_error is valid after the CLK2 edge, stage_panic after the CLK3 edge.
module stem_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk1,
  input  logic         clk2,
  input  logic         clk3,
  input  logic         load_backup,
  input  logic         load_panic,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         stage_error,
  output logic         stage_panic
);

  logic [W-1:0] err, pan;

  for (genvar i = 0; i < W; i++) begin : g_bit
    stem_cell u_cell (
      .clk1       (clk1),
      .clk2       (clk2),
      .clk3       (clk3),
      .data_in    (d[i]),
      .load_backup(load_backup),
      .load_panic (load_panic),
      .data_out   (q[i]),
      .error      (err[i]),
      .panic      (pan[i])
    );
  end

  assign stage_error = |err;
  assign stage_panic = |pan;

endmodule
