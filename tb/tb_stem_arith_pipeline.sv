// tb_stem_arith_pipeline: end-to-end test of the STEM adder-multiplier
// pipeline with its clock control, overclocked at T_Min = 7 ns
// (Phi1 = 2 ns, Phi2 = 1 ns).
//
// A source feeds N_OPS random operand pairs under the commit handshake and
// a sink checks that every product (upper half of a+b times lower half)
// leaves the write buffer exactly once and in order. While it runs, the
// test injects faults on the hold-padded stage outputs (inputs of s1_reg
// and s2_reg), forcing a wrong value just around one clock edge:
//   soft error at the CLK1, CLK2 or CLK3 edge (a transient pulse), and
//   timing error (the previous value still present at the CLK1 edge).
// It counts the Error and Panic recoveries, and checks that the pipeline
// lost exactly 4 cycles per Error (the faulty cycle plus the three-cycle
// recovery) and 1 per Panic.
module tb_stem_arith_pipeline;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  localparam int W = 64;
  localparam int N_OPS = 400;
  localparam int PHI1 = 2000, PHI2 = 1000;

  logic clk1_g, clk2_g, clk3_g, rst_n = 0;
  logic clk1_p, clk2_p, clk3_p, load_backup, load_panic, commit, recovery;
  logic global_error, global_panic;
  logic [2:0] stage_error, stage_panic;
  stem_state_e state;
  int unsigned period_ps;

  logic in_valid;
  logic [W-1:0] in_a, in_b, out_data;
  logic out_valid;

  logic [W-1:0] opa[N_OPS], opb[N_OPS], expq[N_OPS];
  int idx = 0, nout = 0;
  int checks = 0, failures = 0;
  int n_err = 0, n_pan = 0, n_cycles = 0, n_commit = 0;
  int n_inj[8];

  clock_generator_model #(.PHI1_PS(PHI1), .PHI2_PS(PHI2)) u_gen (
    .step(6'd32), .clk1(clk1_g), .clk2(clk2_g), .clk3(clk3_g),
    .period_ps(period_ps));

  stem_clock_control u_ctl (
    .clk1_g, .clk2_g, .clk3_g, .rst_n, .global_error, .global_panic,
    .clk1_p, .clk2_p, .clk3_p, .load_backup, .load_panic, .commit,
    .recovery, .state);

  stem_arith_pipeline #(.ADD_W(W)) dut (
    .clk1_p, .clk2_p, .clk3_p, .clk1_g, .rst_n, .load_backup, .load_panic,
    .commit, .in_valid, .in_a, .in_b, .out_valid, .out_data, .stage_error,
    .stage_panic, .global_error, .global_panic);

  // ---------------- source ----------------
  assign in_valid = rst_n && (idx < N_OPS);
  assign in_a = (idx < N_OPS) ? opa[idx] : '0;
  assign in_b = (idx < N_OPS) ? opb[idx] : '0;
  always @(negedge clk1_g) if (commit && idx < N_OPS) idx <= idx + 1;

  // ---------------- sink ----------------
  always @(posedge clk1_g) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (nout >= N_OPS || out_data !== expq[nout]) begin
        failures++;
        $display("FAIL result %0d: got %h expected %h", nout, out_data,
                 (nout < N_OPS) ? expq[nout] : '0);
      end
      nout++;
    end
  end
  // per-cycle accounting at the falling edge, where the control decides
  always @(negedge clk1_g) if (rst_n) begin
    n_cycles++;
    if (commit)      n_commit++;
    if (load_backup) n_err++;
    if (load_panic)  n_pan++;
  end

  // ---------------- fault injection ----------------
  logic [W:0] last1, last2, fv;
  always @(posedge clk1_g) begin
    last1 <= dut.s1_d;
    last2 <= dut.s2_d;
  end

  // kind: 0 SE@CLK1, 1 SE@CLK2, 2 SE@CLK3, 3 TE@CLK1 ; stage 1 or 2
  task automatic inject(input int kind, input int stage);
    logic [W:0] mask;
    int at;
    mask = (W+1)'(1) << $urandom_range(0, W - 1);
    if ($urandom_range(0, 1)) mask |= (W+1)'(1) << $urandom_range(0, W - 1);
    at = (kind == 1) ? PHI1 : (kind == 2) ? PHI1 + PHI2 : 0;
    // we are just after a CLK3 edge; go to 100 ps before the target edge
    #(int'(period_ps) - PHI1 - PHI2 - 300 + at);
    if (kind == 3) fv = (stage == 1) ? last1 : last2;   // stale value
    else           fv = ((stage == 1) ? dut.s1_d : dut.s2_d) ^ mask;
    if (stage == 1) force dut.s1_d = fv; else force dut.s2_d = fv;
    #((kind == 3) ? 600 : 200);
    if (stage == 1) release dut.s1_d; else release dut.s2_d;
  endtask

  initial begin : watchdog
    #(64'd7000 * 64'd40000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s;
    int kind, stage;
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
      if (state == STEM_RUN && idx > 2 && idx < N_OPS - 2 &&
          $urandom_range(0, 5) == 0) begin
        kind  = $urandom_range(0, 3);
        stage = $urandom_range(1, 2);
        n_inj[kind]++;
        inject(kind, stage);
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
    // cycle accounting: every cycle not committed is due to a recovery
    checks++;
    if (n_cycles - n_commit != 4 * n_err + n_pan) begin
      failures++;
      $display("FAIL: cycles %0d committed %0d errors %0d panics %0d",
               n_cycles, n_commit, n_err, n_pan);
    end
    checks++;
    if (n_err == 0 || n_pan == 0) begin
      failures++;
      $display("FAIL: error recovery %0d / panic recovery %0d never seen", n_err, n_pan);
    end
    $display("injected SE1=%0d SE2=%0d SE3=%0d TE=%0d ; recoveries error=%0d panic=%0d ; cycles=%0d committed=%0d",
             n_inj[0], n_inj[1], n_inj[2], n_inj[3], n_err, n_pan, n_cycles, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
