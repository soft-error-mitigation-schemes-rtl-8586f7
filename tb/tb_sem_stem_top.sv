// tb_sem_stem_top: end-to-end test of the whole design at its default
// parameters (64-bit adder, 32-bit multiplier, 10000-cycle sampling
// interval, 1 % target error rate, 32 clock steps between 9 ns and 7 ns).
//
// Both pipelines run side by side from clock generator models. The STEM
// side's generator follows the overclock controller's step. Sources feed
// endless pseudo-random operand streams, sinks check every product in
// order against a model. Fault injectors force wrong values onto the
// hold-padded stage outputs around one clock edge: transients at the
// CLK1, CLK2 or CLK3 edge and, on the STEM side, late (stale) data at the
// CLK1 edge, i.e. a timing error.
//
// STEM phases: no overclocking (NOOC), dynamic overclocking with a low
// fault rate (the clock must step up), dynamic with a high fault rate (it
// must step down), maximum overclocking (MAXOC). The test counts every
// mechanism and fails if one never happened: Error recovery, Panic
// recovery, timing error detected, step up, step down, NOOC and MAXOC
// periods, SEM recovery, SEM false positive, SEM benign. It also checks
// the recovery penalties (4 uncommitted cycles per STEM Error, 1 per Panic,
// 1 per SEM recovery) and that MAXOC gives more results per ns than NOOC.
module tb_sem_stem_top;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  localparam int W = 64;
  localparam int INTERVAL = 10000;   // the top's default

  logic rst_n = 0;
  // STEM side
  logic st_clk1, st_clk2, st_clk3;
  oc_mode_e oc_mode = OC_NOOC;
  logic st_in_valid, st_in_commit, st_out_valid, st_lb, st_lp, st_rec;
  logic [W-1:0] st_in_a, st_in_b, st_out;
  logic [2:0] st_serr, st_span;
  logic [5:0] oc_step;
  logic [$clog2(INTERVAL+1)-1:0] oc_last_errors;
  logic oc_interval_done;
  stem_state_e st_state;
  int unsigned st_period;
  // SEM side
  logic se_clk1, se_clk2, se_clk3;
  logic se_in_valid, se_in_commit, se_out_valid, se_rec, se_ben;
  logic [W-1:0] se_in_a, se_in_b, se_out;
  logic [2:0] se_serr;
  sem_state_e se_state;
  int unsigned se_period;

  clock_generator_model #(.PHI1_PS(2000), .PHI2_PS(1000)) u_gen_stem (
    .step(oc_step), .clk1(st_clk1), .clk2(st_clk2), .clk3(st_clk3),
    .period_ps(st_period));
  clock_generator_model #(.PHI1_PS(1000), .PHI2_PS(1000)) u_gen_sem (
    .step(6'd0), .clk1(se_clk1), .clk2(se_clk2), .clk3(se_clk3),
    .period_ps(se_period));

  sem_stem_top dut (
    .rst_n,
    .stem_clk1_g(st_clk1), .stem_clk2_g(st_clk2), .stem_clk3_g(st_clk3),
    .oc_mode, .stem_in_valid(st_in_valid), .stem_in_a(st_in_a),
    .stem_in_b(st_in_b), .stem_in_commit(st_in_commit),
    .stem_out_valid(st_out_valid), .stem_out_data(st_out),
    .stem_load_backup(st_lb), .stem_load_panic(st_lp),
    .stem_recovery(st_rec), .stem_stage_error(st_serr),
    .stem_stage_panic(st_span), .oc_step, .oc_last_errors,
    .oc_interval_done, .stem_state(st_state),
    .sem_clk1_g(se_clk1), .sem_clk2_g(se_clk2), .sem_clk3_g(se_clk3),
    .sem_in_valid(se_in_valid), .sem_in_a(se_in_a), .sem_in_b(se_in_b),
    .sem_in_commit(se_in_commit), .sem_out_valid(se_out_valid),
    .sem_out_data(se_out), .sem_recovery(se_rec),
    .sem_stage_error(se_serr), .sem_benign(se_ben), .sem_state(se_state));

  int checks = 0, failures = 0;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // operand streams: a fixed mix of the index (independent of the DUT)
  function automatic logic [W-1:0] opnd(input int i, input int which);
    logic [W-1:0] x;
    x = W'(i) * 64'h9E3779B97F4A7C15 + W'(which) * 64'hC2B2AE3D27D4EB4F;
    x = x ^ (x >> 29);
    x = x * 64'hBF58476D1CE4E5B9;
    return x ^ (x >> 32);
  endfunction
  function automatic logic [W-1:0] model(input int i, input int which);
    logic [W-1:0] s;
    s = opnd(i, which) + opnd(i, which + 1);
    return W'(s[W-1:W/2]) * W'(s[W/2-1:0]);
  endfunction

  // ---------------- STEM source / sink / accounting ----------------
  int st_idx = 0, st_nout = 0;
  assign st_in_valid = rst_n;
  assign st_in_a = opnd(st_idx, 0);
  assign st_in_b = opnd(st_idx, 1);
  always @(negedge st_clk1) if (st_in_commit) st_idx <= st_idx + 1;
  always @(posedge st_clk1) if (rst_n && st_out_valid) begin
    checks++;
    if (st_out !== model(st_nout, 0)) begin
      failures++;
      $display("FAIL STEM result %0d: got %h expected %h", st_nout, st_out,
               model(st_nout, 0));
    end
    st_nout++;
  end

  int st_cycles = 0, st_commits = 0, st_err = 0, st_pan = 0;
  int n_up = 0, n_down = 0, n_te_det = 0;
  longint t_nooc = 0, t_maxoc = 0;
  int r_nooc = 0, r_maxoc = 0;
  logic [5:0] prev_step = '0;
  bit te_pending = 0;
  always @(negedge st_clk1) if (rst_n) begin
    st_cycles++;
    if (st_in_commit) st_commits++;
    if (st_lb) st_err++;
    if (st_lp) st_pan++;
  end
  always @(posedge st_clk1) if (rst_n) begin
    if (oc_step > prev_step && oc_mode == OC_DYNOC) n_up++;
    if (oc_step < prev_step && oc_mode == OC_DYNOC) n_down++;
    prev_step <= oc_step;
    if (oc_mode == OC_NOOC) begin
      t_nooc += st_period;
      if (st_out_valid) r_nooc++;
      if (st_period != 9000) begin
        failures++; $display("FAIL NOOC period %0d", st_period);
      end
    end
    if (oc_mode == OC_MAXOC && oc_step == 6'd32) begin
      t_maxoc += st_period;
      if (st_out_valid) r_maxoc++;
    end
  end

  // ---------------- SEM source / sink / accounting ----------------
  int se_idx = 0, se_nout = 0;
  assign se_in_valid = rst_n;
  assign se_in_a = opnd(se_idx, 2);
  assign se_in_b = opnd(se_idx, 3);
  always @(negedge se_clk1) if (se_in_commit) se_idx <= se_idx + 1;
  always @(posedge se_clk1) if (rst_n && se_out_valid) begin
    checks++;
    if (se_out !== model(se_nout, 2)) begin
      failures++;
      $display("FAIL SEM result %0d: got %h expected %h", se_nout, se_out,
               model(se_nout, 2));
    end
    se_nout++;
  end

  int se_cycles = 0, se_commits = 0, se_recs = 0, se_fp = 0, se_bn = 0;
  always @(negedge se_clk1) if (rst_n) begin
    se_cycles++;
    if (se_in_commit) se_commits++;
    if (se_rec) se_recs++;
    if (se_state == SEM_RUN && |se_serr && se_ben) se_fp++;
    if (se_state == SEM_RUN && !(|se_serr) && se_ben) se_bn++;
  end

  // ---------------- fault injection ----------------
  int st_rate = 400;        // one fault per st_rate cycles on average
  bit inject_on = 0;
  logic [W:0] st_last1, st_last2, st_fv, se_fv;
  always @(posedge st_clk1) begin
    st_last1 <= dut.u_stem_pipe.s1_d;
    st_last2 <= dut.u_stem_pipe.s2_d;
  end

  initial begin : stem_injector
    int kind, stage, at;
    int unsigned p0;
    logic [W:0] mask;
    forever begin
      @(posedge st_clk3);
      #200;
      // only into a cycle that will run normally: no recovery pending
      if (inject_on && st_state == STEM_RUN && !(|st_serr) && !(|st_span) &&
          $urandom_range(0, st_rate - 1) == 0) begin
        p0 = st_period;
        kind  = $urandom_range(0, 3);   // SE@1, SE@2, SE@3, TE@1
        stage = $urandom_range(1, 2);
        mask  = (W+1)'(1) << $urandom_range(0, W - 1);
        at    = (kind == 1) ? 2000 : (kind == 2) ? 3000 : 0;
        #(int'(st_period) - 3000 - 300 + at);
        if (kind == 3) st_fv = (stage == 1) ? st_last1 : st_last2;
        else st_fv = ((stage == 1) ? dut.u_stem_pipe.s1_d
                                   : dut.u_stem_pipe.s2_d) ^ mask;
        if (kind == 3 && st_fv != ((stage == 1) ? dut.u_stem_pipe.s1_d
                                                : dut.u_stem_pipe.s2_d))
          te_pending = 1;
        if (stage == 1) force dut.u_stem_pipe.s1_d = st_fv;
        else            force dut.u_stem_pipe.s2_d = st_fv;
        #((kind == 3) ? 600 : 200);
        if (stage == 1) release dut.u_stem_pipe.s1_d;
        else            release dut.u_stem_pipe.s2_d;
        if (te_pending) begin
          // a late value at CLK1 must be caught by the CLK2 comparison
          // (not checked if the period changed, so the edge was missed)
          @(posedge st_clk2);
          #100;
          if (st_period == p0) begin
            checks++;
            if (|st_serr) n_te_det++;
            else begin
              failures++; $display("FAIL timing error not detected at %0t", $time);
            end
          end
          te_pending = 0;
        end
      end
    end
  end

  initial begin : sem_injector
    int kind, stage, at;
    logic [W:0] mask;
    forever begin
      @(posedge se_clk3);
      #200;
      if (inject_on && se_state == SEM_RUN && !dut.u_sem_pipe.global_recover &&
          $urandom_range(0, 59) == 0) begin
        kind  = $urandom_range(0, 2);
        stage = $urandom_range(1, 2);
        mask  = (W+1)'(1) << $urandom_range(0, W - 1);
        at    = (kind == 1) ? 1000 : (kind == 2) ? 2000 : 0;
        #(int'(se_period) - 2000 - 300 + at);
        se_fv = ((stage == 1) ? dut.u_sem_pipe.s1_d
                              : dut.u_sem_pipe.s2_d) ^ mask;
        if (stage == 1) force dut.u_sem_pipe.s1_d = se_fv;
        else            force dut.u_sem_pipe.s2_d = se_fv;
        #200;
        if (stage == 1) release dut.u_sem_pipe.s1_d;
        else            release dut.u_sem_pipe.s2_d;
      end
    end
  end

  initial begin : watchdog
    #(64'd9000 * 64'd200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic intervals(input int n);
    repeat (n) @(posedge oc_interval_done);
    @(posedge st_clk1);
  endtask

  initial begin
    logic [5:0] s0;
    repeat (5) @(posedge st_clk1);
    #100 rst_n = 1;
    inject_on = 1;
    // NOOC: one interval at T_Max
    oc_mode = OC_NOOC;
    intervals(1);
    expect_true(oc_step == 0, "NOOC holds step 0");
    // DYNOC, low fault rate: the clock speeds up every interval
    oc_mode = OC_DYNOC; st_rate = 1000;
    intervals(6);
    expect_true(oc_step >= 5, "DYNOC steps up under a low error rate");
    // DYNOC, high fault rate: the clock slows down
    s0 = oc_step;
    st_rate = 20;
    intervals(3);
    expect_true(oc_step < s0, "DYNOC steps down under a high error rate");
    expect_true(oc_last_errors * 100 >= INTERVAL, "interval error count above 1 %");
    // MAXOC: one interval at T_Min
    st_rate = 400;
    oc_mode = OC_MAXOC;
    intervals(1);
    expect_true(oc_step == 32 && st_period == 7000, "MAXOC runs at T_Min");
    inject_on = 0;
    repeat (20) @(posedge st_clk1);
    repeat (20) @(posedge se_clk1);
    @(negedge st_clk1);
    @(negedge se_clk1);
    #100;
    // recovery penalties
    expect_true(st_cycles - st_commits == 4 * st_err + st_pan,
                "STEM: 4 cycles per Error, 1 per Panic");
    expect_true(se_cycles - se_commits == se_recs, "SEM: 1 cycle per recovery");
    // every result that entered came out
    expect_true(st_nout >= st_idx - 3 && st_nout > 1000, "STEM results delivered");
    expect_true(se_nout >= se_idx - 3 && se_nout > 1000, "SEM results delivered");
    // overclocking pays off
    expect_true(r_nooc > 0 && r_maxoc > 0 &&
                longint'(t_maxoc) * r_nooc < longint'(t_nooc) * r_maxoc,
                "MAXOC has a shorter time per result than NOOC");
    // every mechanism happened
    expect_true(st_err > 0,   "STEM Error recovery");
    expect_true(st_pan > 0,   "STEM Panic recovery");
    expect_true(n_te_det > 0, "STEM timing error detected");
    expect_true(n_up > 0,     "clock step up");
    expect_true(n_down > 0,   "clock step down");
    expect_true(se_recs > 0,  "SEM recovery");
    expect_true(se_fp > 0,    "SEM false positive");
    expect_true(se_bn > 0,    "SEM benign");
    $display("STEM: results=%0d cycles=%0d errors=%0d panics=%0d TE detected=%0d steps up=%0d down=%0d",
             st_nout, st_cycles, st_err, st_pan, n_te_det, n_up, n_down);
    $display("STEM: ps per result NOOC=%0d MAXOC=%0d",
             t_nooc / r_nooc, t_maxoc / r_maxoc);
    $display("SEM:  results=%0d cycles=%0d recoveries=%0d false positives=%0d benign=%0d",
             se_nout, se_cycles, se_recs, se_fp, se_bn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
