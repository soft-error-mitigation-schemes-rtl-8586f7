// write_buffer: result buffer after the last pipeline stage.
//
// A plain register, not a STEM cell, as in the document: it takes the
// speculative output of the last stage only once the clock control has
// declared that cycle's captures error free (`commit`), so what leaves the
// pipeline is never a value with a timing or soft error. Sampled on the
// falling edge of the ungated CLK1, where the clock control decides.
// `valid_out` is high for the one cycle after a commit of valid data and
// is the write strobe for whatever the pipeline writes to. Clocking and
// strobe are this design's choices. rst_n asynchronous, active low.
module write_buffer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,       // ungated CLK1, used on its falling edge
  input  logic         rst_n,
  input  logic         commit,
  input  logic         valid_in,
  input  logic [W-1:0] data_in,
  output logic         valid_out,
  output logic [W-1:0] data_out
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      valid_out <= commit && valid_in;
      if (commit && valid_in) data_out <= data_in;
    end
  end

endmodule
