// tb_sem_arith_pipeline: end-to-end test of the SEM adder-multiplier
// pipeline with its clock control at the worst-case period of 9 ns
// (Phi1 = Phi2 = 1 ns).
//
// A source feeds N_OPS random operand pairs under the commit handshake and
// a sink checks that every product leaves the result buffer exactly once,
// in order and correct. Transient faults are injected on the hold-padded
// inputs of s1_reg and s2_reg around one clock edge: at the CLK1 edge
// (R1 corrupted: must cost exactly one stalled cycle), at the CLK2 edge
// (false positive: Error and Benign, no recovery) and at the CLK3 edge
// (Benign only, no recovery). All three outcomes must be seen.
module tb_sem_arith_pipeline;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  localparam int W = 64;
  localparam int N_OPS = 400;
  localparam int PHI1 = 1000, PHI2 = 1000;

  logic clk1_g, clk2_g, clk3_g, rst_n = 0;
  logic clk1_p, clk2_p, clk3_p, load_backup, commit, recovery;
  logic global_recover;
  logic [2:0] stage_error, stage_benign;
  sem_state_e state;
  int unsigned period_ps;

  logic in_valid;
  logic [W-1:0] in_a, in_b, out_data;
  logic out_valid;

  logic [W-1:0] opa[N_OPS], opb[N_OPS], expq[N_OPS];
  int idx = 0, nout = 0;
  int checks = 0, failures = 0;
  int n_rec = 0, n_fp = 0, n_ben = 0, n_cycles = 0, n_commit = 0;
  int n_inj[3];

  clock_generator_model #(.PHI1_PS(PHI1), .PHI2_PS(PHI2)) u_gen (
    .step(6'd0), .clk1(clk1_g), .clk2(clk2_g), .clk3(clk3_g),
    .period_ps(period_ps));

  sem_clock_control u_ctl (
    .clk1_g, .clk2_g, .clk3_g, .rst_n, .global_recover,
    .clk1_p, .clk2_p, .clk3_p, .load_backup, .commit, .recovery, .state);

  sem_arith_pipeline #(.ADD_W(W)) dut (
    .clk1_p, .clk2_p, .clk3_p, .clk1_g, .rst_n, .load_backup, .commit,
    .in_valid, .in_a, .in_b, .out_valid, .out_data, .stage_error,
    .stage_benign, .global_recover);

  assign in_valid = rst_n && (idx < N_OPS);
  assign in_a = (idx < N_OPS) ? opa[idx] : '0;
  assign in_b = (idx < N_OPS) ? opb[idx] : '0;
  always @(negedge clk1_g) if (commit && idx < N_OPS) idx <= idx + 1;

  always @(posedge clk1_g) if (rst_n && out_valid) begin
    checks++;
    if (nout >= N_OPS || out_data !== expq[nout]) begin
      failures++;
      $display("FAIL result %0d: got %h expected %h", nout, out_data,
               (nout < N_OPS) ? expq[nout] : '0);
    end
    nout++;
  end

  always @(negedge clk1_g) if (rst_n) begin
    n_cycles++;
    if (commit)      n_commit++;
    if (load_backup) n_rec++;
    if (state == SEM_RUN && |stage_error && |stage_benign) n_fp++;
    if (state == SEM_RUN && !(|stage_error) && |stage_benign) n_ben++;
  end

  logic [W:0] fv;
  // kind: 0 at CLK1, 1 at CLK2, 2 at CLK3 ; stage 1 or 2
  task automatic inject(input int kind, input int stage);
    logic [W:0] mask;
    int at;
    mask = (W+1)'(1) << $urandom_range(0, W - 1);
    at = (kind == 1) ? PHI1 : (kind == 2) ? PHI1 + PHI2 : 0;
    #(int'(period_ps) - PHI1 - PHI2 - 300 + at);
    fv = ((stage == 1) ? dut.s1_d : dut.s2_d) ^ mask;
    if (stage == 1) force dut.s1_d = fv; else force dut.s2_d = fv;
    #200;
    if (stage == 1) release dut.s1_d; else release dut.s2_d;
  endtask

  initial begin : watchdog
    #(64'd9000 * 64'd40000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s;
    int kind;
    for (int i = 0; i < N_OPS; i++) begin
      opa[i] = {$urandom, $urandom};
      opb[i] = {$urandom, $urandom};
      s = opa[i] + opb[i];
      expq[i] = W'(s[W-1:W/2]) * W'(s[W/2-1:0]);
    end
    repeat (5) @(posedge clk1_g);
    #100 rst_n = 1;
    while (nout < N_OPS) begin
      @(posedge clk3_g);
      #200;
      if (state == SEM_RUN && idx > 2 && idx < N_OPS - 2 &&
          $urandom_range(0, 4) == 0) begin
        kind = $urandom_range(0, 2);
        n_inj[kind]++;
        inject(kind, $urandom_range(1, 2));
      end
    end
    repeat (3) @(posedge clk1_g);
    @(negedge clk1_g);
    #100;
    checks++;
    if (nout != N_OPS) begin
      failures++;
      $display("FAIL: %0d results for %0d operands", nout, N_OPS);
    end
    checks++;
    if (n_cycles - n_commit != n_rec) begin
      failures++;
      $display("FAIL: cycles %0d committed %0d recoveries %0d", n_cycles,
               n_commit, n_rec);
    end
    checks++;
    if (n_rec == 0 || n_fp == 0 || n_ben == 0) begin
      failures++;
      $display("FAIL: recovery %0d false-positive %0d benign %0d", n_rec, n_fp, n_ben);
    end
    $display("injected CLK1=%0d CLK2=%0d CLK3=%0d ; recoveries=%0d false positives=%0d benign=%0d ; cycles=%0d committed=%0d",
             n_inj[0], n_inj[1], n_inj[2], n_rec, n_fp, n_ben, n_cycles, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
