// sem_arith_pipeline: the two-stage adder-multiplier pipeline with SEM
// cells as pipeline registers, for operation at the worst-case period.
//
// Same datapath as stem_arith_pipeline: ADD_W-bit adder, then a multiplier
// of the upper by the lower half of the sum. Registers in_reg {valid,a,b},
// s1_reg {valid,sum}, s2_reg {valid,product} are sem_regs. The stage
// recover signals (Error and not Benign) are OR-ed into global_recover for
// sem_clock_control, which answers with a one-cycle stall and LBkup. The
// stage Error and Benign ORs are brought out for logging.
//
// From the document: SEM cells replace the pipeline registers, the adder
// and multiplier sizes, one-cycle global stall recovery. This design's
// choices: the split of the sum, the valid bits, and a result register
// (write_buffer) that passes a product on only after its cycle is
// committed, since the SEM vote finishes only after the CLK3 edge.
//
// Interface and latency as in stem_arith_pipeline: the source moves to its
// next operand at each falling edge of clk1_g at which `commit` is high.
// Hold padding as in stem_arith_pipeline: HOLD_NS (2.5 ns) must exceed
// Phi1 + Phi2 of the clocks used (1 ns + 1 ns here).
module sem_arith_pipeline #(
  parameter int unsigned ADD_W   = 64,
  parameter real         HOLD_NS = 2.5   // > Phi1 + Phi2, see hold_delay
) (
  input  logic               clk1_p,
  input  logic               clk2_p,
  input  logic               clk3_p,
  input  logic               clk1_g,
  input  logic               rst_n,
  input  logic               load_backup,
  input  logic               commit,
  input  logic               in_valid,
  input  logic [ADD_W-1:0]   in_a,
  input  logic [ADD_W-1:0]   in_b,
  output logic               out_valid,
  output logic [ADD_W-1:0]   out_data,
  output logic [2:0]         stage_error,
  output logic [2:0]         stage_benign,
  output logic               global_recover
);

  localparam int unsigned MUL_W = ADD_W / 2;

  logic [2*ADD_W:0]  in_q;
  logic [ADD_W:0]    s1_q, s2_q;
  logic [ADD_W-1:0]  sum;
  logic [ADD_W-1:0]  prod;
  logic [ADD_W:0]    s1_d, s2_d;   // stage outputs after hold padding
  logic [2:0]        stage_recover;

  sem_reg #(.W(2*ADD_W+1)) u_in_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p), .load_backup(load_backup),
    .d({in_valid, in_a, in_b}), .q(in_q),
    .stage_recover(stage_recover[0]), .stage_error(stage_error[0]),
    .stage_benign(stage_benign[0])
  );

  assign sum = in_q[2*ADD_W-1:ADD_W] + in_q[ADD_W-1:0];

  hold_delay #(.W(ADD_W+1), .DELAY_NS(HOLD_NS)) u_hold1 (
    .d({in_q[2*ADD_W], sum}), .q(s1_d)
  );

  sem_reg #(.W(ADD_W+1)) u_s1_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p), .load_backup(load_backup),
    .d(s1_d), .q(s1_q),
    .stage_recover(stage_recover[1]), .stage_error(stage_error[1]),
    .stage_benign(stage_benign[1])
  );

  assign prod = s1_q[ADD_W-1:MUL_W] * s1_q[MUL_W-1:0];

  hold_delay #(.W(ADD_W+1), .DELAY_NS(HOLD_NS)) u_hold2 (
    .d({s1_q[ADD_W], prod}), .q(s2_d)
  );

  sem_reg #(.W(ADD_W+1)) u_s2_reg (
    .clk1(clk1_p), .clk2(clk2_p), .clk3(clk3_p), .load_backup(load_backup),
    .d(s2_d), .q(s2_q),
    .stage_recover(stage_recover[2]), .stage_error(stage_error[2]),
    .stage_benign(stage_benign[2])
  );

  error_combine #(.N(3)) u_rec_or (
    .stage_err(stage_recover), .global_err(global_recover)
  );

  write_buffer #(.W(ADD_W)) u_wbuf (
    .clk(clk1_g), .rst_n(rst_n), .commit(commit),
    .valid_in(s2_q[ADD_W]), .data_in(s2_q[ADD_W-1:0]),
    .valid_out(out_valid), .data_out(out_data)
  );

endmodule
