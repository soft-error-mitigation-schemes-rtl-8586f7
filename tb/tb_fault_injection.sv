// tb_fault_injection: fault-injection campaign on the whole design at its
// default parameters, in the three STEM overclocking modes and for SEM.
//
// The STEM side runs 3 ms in each mode, in the order NOOC (T = 9 ns),
// DYNOC (T moved between 9 and 7 ns by the error-rate controller, 1 %
// target over 10000 cycles) and MAXOC (T = 7 ns). The SEM side runs at
// 9 ns for the whole 9 ms. Both pipelines take an endless stream of
// pseudo-random operands; every product is checked, in order, against a
// model of the datapath.
//
// Transient pulses: on each side about one pulse per 1.48 us of simulated
// time (about 2000 per 3 ms). Each pulse flips one random bit, for a width
// drawn uniformly from 500 to 900 ps. It starts at a random time in the
// cycle and lands on the input of one random pipeline register (operand,
// sum or product register). A pulse is caught only if it covers a sampling
// edge of a running clock, so most pulses do nothing.
//
// Timing errors (STEM side): in a random 1 of 20000 cycles the adder or
// the multiplier takes a long path. Its delay is drawn from 7.0 to 8.9 ns.
// When that is longer than the current period, the register input still
// shows the previous result at the CLK1 edge. The new value arrives
// delay - T after the edge, before CLK2, as the STEM timing rule
// T + Phi1 >= delay requires. Every such late value must raise the stage
// Error; at 9 ns no timing errors can occur.
//
// The test also checks the recovery penalties:
//  * STEM: 4 uncommitted cycles per Error and 1 per Panic.
//  * SEM: 1 uncommitted cycle per repair.
// It checks that no product is lost or wrong, that DYNOC raises the clock
// frequency, and that MAXOC and DYNOC beat NOOC in time per result. Per
// mode it prints pulses injected and recoveries caused, in the form of a
// fault-injection table. Runs in about half a minute with Verilator.
module tb_fault_injection;
  timeunit 1ps;
  timeprecision 1ps;
  import sem_pkg::*;

  localparam int W = 64;
  localparam int INTERVAL = 10000;
  localparam longint RUN_PS = 64'd3_000_000_000;   // 3 ms per mode
  localparam int unsigned PULSE_GAP_PS = 1_477_000; // mean pulse spacing
  localparam int LONG_PATH_ONE_IN = 20000;

  logic rst_n = 0;
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

  // mode index for the per-mode statistics: 0 NOOC, 1 DYNOC, 2 MAXOC
  int ph = 0;
  bit running = 0;

  // ---------------- STEM source, sink, accounting ----------------
  int st_idx = 0, st_nout = 0;
  logic [W-1:0] st_pulse = '0, se_pulse = '0;   // pulses on operand a
  assign st_in_valid = rst_n;
  assign st_in_a = opnd(st_idx, 0) ^ st_pulse;
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

  int st_cycles = 0, st_commits = 0;
  int st_err[3] = '{0, 0, 0}, st_pan[3] = '{0, 0, 0};
  int st_set[3] = '{0, 0, 0}, st_te[3] = '{0, 0, 0}, st_te_det[3] = '{0, 0, 0};
  int st_res[3] = '{0, 0, 0};
  longint st_time[3] = '{0, 0, 0};
  int n_up = 0;
  logic [5:0] prev_step = '0;
  always @(negedge st_clk1) if (rst_n) begin
    st_cycles++;
    if (st_in_commit) st_commits++;
    if (running) begin
      if (st_lb) st_err[ph]++;
      if (st_lp) st_pan[ph]++;
    end
  end
  always @(posedge st_clk1) if (rst_n) begin
    if (oc_step > prev_step && oc_mode == OC_DYNOC) n_up++;
    prev_step <= oc_step;
    if (running) begin
      st_time[ph] += longint'(st_period);
      if (st_out_valid) st_res[ph]++;
    end
  end

  // ---------------- SEM source, sink, accounting ----------------
  int se_idx = 0, se_nout = 0;
  assign se_in_valid = rst_n;
  assign se_in_a = opnd(se_idx, 2) ^ se_pulse;
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

  int se_cycles = 0, se_commits = 0, se_recs = 0, se_fp = 0, se_bn = 0, se_set = 0;
  always @(negedge se_clk1) if (rst_n) begin
    se_cycles++;
    if (se_in_commit) se_commits++;
    if (running) begin
      if (se_rec) se_recs++;
      if (se_state == SEM_RUN && |se_serr && se_ben) se_fp++;
      if (se_state == SEM_RUN && !(|se_serr) && se_ben) se_bn++;
    end
  end

  // ---------------- STEM fault injection ----------------
  // Anchor of each cycle: 200 ps after CLK3, before the stage outputs
  // change; the next CLK1 edge is then st_period - Phi1 - Phi2 - 200 away.
  logic [W:0] st_last1, st_last2;
  always @(posedge st_clk1) begin
    st_last1 <= dut.u_stem_pipe.s1_d;
    st_last2 <= dut.u_stem_pipe.s2_d;
  end

  task automatic stem_pulse(input int unsigned p);
    int unsigned start, width, tgt, bitn;
    logic [W:0] v;
    start = $urandom_range(0, p - 1);
    width = $urandom_range(500, 900);
    tgt   = $urandom_range(0, 2);
    bitn  = $urandom_range(0, W - 1);
    st_set[ph]++;
    #(start);
    case (tgt)
      0: begin
        st_pulse = W'(1) << bitn;
        #(width);
        st_pulse = '0;
      end
      1: begin
        v = dut.u_stem_pipe.s1_d ^ ((W+1)'(1) << bitn);
        force dut.u_stem_pipe.s1_d = v;
        #(width);
        release dut.u_stem_pipe.s1_d;
      end
      default: begin
        v = dut.u_stem_pipe.s2_d ^ ((W+1)'(1) << bitn);
        force dut.u_stem_pipe.s2_d = v;
        #(width);
        release dut.u_stem_pipe.s2_d;
      end
    endcase
  endtask

  task automatic stem_late(input int unsigned p);
    int unsigned dly, stage;
    logic [W:0] stale, now;
    dly   = $urandom_range(7000, 8900);
    stage = $urandom_range(1, 2);
    if (dly <= p) return;              // the path fits in this period
    #(p - 3000 - 200 - 300);           // 300 ps before the next CLK1 edge
    if (st_period != p) return;        // period changed meanwhile
    stale = (stage == 1) ? st_last1 : st_last2;
    now   = (stage == 1) ? dut.u_stem_pipe.s1_d : dut.u_stem_pipe.s2_d;
    if (stale == now) return;          // late, but no visible change
    st_te[ph]++;
    if (stage == 1) force dut.u_stem_pipe.s1_d = stale;
    else            force dut.u_stem_pipe.s2_d = stale;
    #(300 + dly - p);
    if (stage == 1) release dut.u_stem_pipe.s1_d;
    else            release dut.u_stem_pipe.s2_d;
    @(posedge st_clk2);
    #100;
    checks++;
    if (|st_serr) st_te_det[ph]++;
    else begin
      failures++;
      $display("FAIL timing error not detected at %0t", $time);
    end
  endtask

  initial begin : stem_injector
    int unsigned p;
    forever begin
      @(posedge st_clk3);
      #200;
      p = st_period;
      if (running && st_state == STEM_RUN && !(|st_serr) && !(|st_span)) begin
        if ($urandom_range(1, LONG_PATH_ONE_IN) == 1) stem_late(p);
        else if ($urandom_range(0, PULSE_GAP_PS - 1) < p) stem_pulse(p);
      end
    end
  end

  // ---------------- SEM fault injection ----------------
  task automatic sem_pulse(input int unsigned p);
    int unsigned start, width, tgt, bitn;
    logic [W:0] v;
    start = $urandom_range(0, p - 1);
    width = $urandom_range(500, 900);
    tgt   = $urandom_range(0, 2);
    bitn  = $urandom_range(0, W - 1);
    se_set++;
    #(start);
    case (tgt)
      0: begin
        se_pulse = W'(1) << bitn;
        #(width);
        se_pulse = '0;
      end
      1: begin
        v = dut.u_sem_pipe.s1_d ^ ((W+1)'(1) << bitn);
        force dut.u_sem_pipe.s1_d = v;
        #(width);
        release dut.u_sem_pipe.s1_d;
      end
      default: begin
        v = dut.u_sem_pipe.s2_d ^ ((W+1)'(1) << bitn);
        force dut.u_sem_pipe.s2_d = v;
        #(width);
        release dut.u_sem_pipe.s2_d;
      end
    endcase
  endtask

  initial begin : sem_injector
    forever begin
      @(posedge se_clk3);
      #200;
      if (running && $urandom_range(0, PULSE_GAP_PS - 1) < se_period)
        sem_pulse(se_period);
    end
  end

  initial begin : watchdog
    #(64'd12_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string nm[3] = '{"NOOC ", "DYNOC", "MAXOC"};
    repeat (5) @(posedge st_clk1);
    #100 rst_n = 1;
    running = 1;
    ph = 0; oc_mode = OC_NOOC;
    #(RUN_PS);
    ph = 1; oc_mode = OC_DYNOC;
    #(RUN_PS);
    expect_true(oc_step > 0 && n_up > 0, "DYNOC raised the clock frequency");
    $display("DYNOC step at the end: %0d (period %0d ps)", oc_step, st_period);
    ph = 2; oc_mode = OC_MAXOC;
    #(RUN_PS);
    running = 0;
    repeat (20) @(posedge st_clk1);
    repeat (20) @(posedge se_clk1);
    @(negedge st_clk1);
    @(negedge se_clk1);
    #100;
    expect_true(st_cycles - st_commits ==
                4 * (st_err[0] + st_err[1] + st_err[2]) +
                (st_pan[0] + st_pan[1] + st_pan[2]),
                "STEM: 4 cycles per Error, 1 per Panic");
    expect_true(se_cycles - se_commits == se_recs, "SEM: 1 cycle per recovery");
    expect_true(st_nout >= st_idx - 3, "STEM: no product lost");
    expect_true(se_nout >= se_idx - 3, "SEM: no product lost");
    for (int m = 0; m < 3; m++) begin
      expect_true(st_set[m] > 1000 && st_err[m] + st_pan[m] > 0,
                  "transients injected and caught in every mode");
      expect_true(st_err[m] + st_pan[m] - st_te_det[m] < st_set[m],
                  "fewer recoveries than pulses");
    end
    expect_true(st_te[0] == 0, "no timing errors at T_Max");
    expect_true(st_te[2] > 0, "timing errors at T_Min");
    expect_true(longint'(st_time[2]) * st_res[0] < longint'(st_time[0]) * st_res[2] &&
                longint'(st_time[1]) * st_res[0] < longint'(st_time[0]) * st_res[1],
                "MAXOC and DYNOC faster per result than NOOC");
    expect_true(se_set > 3000 && se_recs > 0 && se_fp > 0 && se_bn > 0,
                "SEM: pulses caught as repair, false positive and benign");
    $display("mode   TE inj  TE det  pulses  err+panic  (from pulses)  ps/result");
    for (int m = 0; m < 3; m++)
      $display("%s  %6d  %6d  %6d  %9d  %13d  %9d", nm[m], st_te[m], st_te_det[m],
               st_set[m], st_err[m] + st_pan[m],
               st_err[m] + st_pan[m] - st_te_det[m], st_time[m] / longint'(st_res[m]));
    $display("SEM 9 ms: pulses=%0d repairs=%0d false positives=%0d benign=%0d results=%0d",
             se_set, se_recs, se_fp, se_bn, se_nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
