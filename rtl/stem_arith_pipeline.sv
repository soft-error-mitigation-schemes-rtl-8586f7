// stem_arith_pipeline: two-stage adder-multiplier pipeline whose pipeline
// registers are STEM cells.
//
// Stage 1 adds two ADD_W-bit operands; stage 2 multiplies the two halves of
// the sum (upper half as multiplicand, lower half as multiplier), giving an
// ADD_W-bit product. Registers, each a stem_reg carrying a valid bit:
//   in_reg  {valid, a, b}  -> adder -> s1_reg {valid, sum}
//   s1_reg -> multiplier   -> s2_reg {valid, product} -> write_buffer
// The stage Error and Panic signals are OR-ed into the global signals for
// the clock control (stem_clock_control), which drives the gated clocks,
// Load_Backup, Load_Panic and `commit`. The write buffer passes a product
// on only when its cycle is committed.
//
// From the document: 64-bit adder then 32-bit multiplier fed by the adder
// output; STEM cells in every pipeline register; plain-register buffer at
// the end; OR-ed stage and global errors. This design's choices: how the
// sum is split between multiplicand and multiplier, the protected input
// register and the valid bits.
//
// Interface: the source presents {in_valid, in_a, in_b} and moves to its
// next operand at each falling edge of clk1_g at which `commit` is high;
// it must hold the operand otherwise (after an Error the same operand is
// taken again). Latency: a product appears on out_data/out_valid 3 commits
// after its operands were taken.
//
// Hold padding: the scheme needs every path into R2/R3 to keep its old
// value until CLK3 has sampled it, i.e. a contamination delay of at least
// Phi1 + Phi2. Each stage output goes through hold_delay (HOLD_NS), a
// transport delay that stands for the delay buffers a layout would add;
// synthesis drops it. With Phi1 = 2 ns, Phi2 = 1 ns the default 3.5 ns fits.
module stem_arith_pipeline #(
  parameter int unsigned ADD_W   = 64,
  parameter real         HOLD_NS = 3.5   // > Phi1 + Phi2, see hold_delay
) (
  input  logic               clk1_p,
  input  logic               clk2_p,
  input  logic               clk3_p,
  input  logic               clk1_g,      // ungated CLK1 for the buffer
  input  logic               rst_n,
  input  logic               load_backup,
  input  logic               load_panic,
  input  logic               commit,
  input  logic               in_valid,
  input  logic [ADD_W-1:0]   in_a,
  input  logic [ADD_W-1:0]   in_b,
  output logic               out_valid,
  output logic [ADD_W-1:0]   out_data,
  output logic [2:0]         stage_error,
  output logic [2:0]         stage_panic,
  output logic               global_error,
  output logic               global_panic
);

  localparam int unsigned MUL_W = ADD_W / 2;

  logic [2*ADD_W:0]  in_q;
  logic [ADD_W:0]    s1_q, s2_q;
  logic [ADD_W-1:0]  sum;    // stage 1 combinational result
  logic [ADD_W-1:0]  prod;   // stage 2 combinational result
  logic [ADD_W:0]    s1_d, s2_d;   // stage outputs after hold padding

  stem_reg #(.W(2*ADD_W+1)) u_in_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p),
    .load_backup(load_backup), .load_panic(load_panic),
    .d({in_valid, in_a, in_b}), .q(in_q),
    .stage_error(stage_error[0]), .stage_panic(stage_panic[0])
  );

  // Stage 1: ADD_W-bit adder.
  assign sum = in_q[2*ADD_W-1:ADD_W] + in_q[ADD_W-1:0];

  hold_delay #(.W(ADD_W+1), .DELAY_NS(HOLD_NS)) u_hold1 (
    .d({in_q[2*ADD_W], sum}), .q(s1_d)
  );

  stem_reg #(.W(ADD_W+1)) u_s1_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p),
    .load_backup(load_backup), .load_panic(load_panic),
    .d(s1_d), .q(s1_q),
    .stage_error(stage_error[1]), .stage_panic(stage_panic[1])
  );

  // Stage 2: MUL_W x MUL_W multiplier on the two halves of the sum.
  assign prod = s1_q[ADD_W-1:MUL_W] * s1_q[MUL_W-1:0];

  hold_delay #(.W(ADD_W+1), .DELAY_NS(HOLD_NS)) u_hold2 (
    .d({s1_q[ADD_W], prod}), .q(s2_d)
  );

  stem_reg #(.W(ADD_W+1)) u_s2_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p),
    .load_backup(load_backup), .load_panic(load_panic),
    .d(s2_d), .q(s2_q),
    .stage_error(stage_error[2]), .stage_panic(stage_panic[2])
  );

  error_combine #(.N(3)) u_err_or (
    .stage_err(stage_error), .global_err(global_error)
  );
  error_combine #(.N(3)) u_pan_or (
    .stage_err(stage_panic), .global_err(global_panic)
  );

  write_buffer #(.W(ADD_W)) u_wbuf (
    .clk(clk1_g), .rst_n(rst_n), .commit(commit),
    .valid_in(s2_q[ADD_W]), .data_in(s2_q[ADD_W-1:0]),
    .valid_out(out_valid), .data_out(out_data)
  );

endmodule
