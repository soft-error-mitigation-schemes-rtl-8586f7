// error_combine: global error network of the pipeline.
//
// The stage error signals of all pipeline stages are OR-ed into one global
// signal that goes to the clock control, as in the document's pipeline
// figure; the pipeline uses one instance for the Error and one for the
// Panic signals. Purely combinational, no clock.
module error_combine #(
  parameter int unsigned N = 4     // stage registers that report an error
) (
  input  logic [N-1:0] stage_err,
  output logic         global_err
);

  assign global_err = |stage_err;

endmodule
