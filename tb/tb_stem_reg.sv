// tb_stem_reg: self-checking test of a W-bit STEM stage register.
//
// Per cycle the test picks a correct word v and injects, just before the
// clock edges, errors on chosen bits: soft errors (flipped bits) in R1, R2
// or R3 samples, timing errors (bits of R1 still at the previous word), and
// the combined case of a timing error on several bits with a soft error in
// R2 on one of them. A per-bit model of R1/R2/R3 gives the expected OR-ed
// stage Error and Panic and the output word. The test plays the clock
// control (shield CLK3 on error, Load_Backup then two stalled cycles, or
// one Load_Panic cycle) and checks that the word is recovered.
module tb_stem_reg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PHI1 = 2000, PHI2 = 1000, T = 9000;
  localparam int W = 8;

  logic clk1 = 0, clk2 = 0, clk3 = 0;
  logic load_backup = 0, load_panic = 0;
  logic [W-1:0] d = '0, q;
  logic stage_error, stage_panic;

  int checks = 0, failures = 0;
  int n_case[6];
  logic [W-1:0] m1, m2, m3, prev;

  stem_reg #(.W(W)) dut (.*);

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cyc(input logic [W-1:0] v, s1, s2, s3, input bit e1, e2,
                     input int e3mode, input bit lb, lp);
    bit e3, exp_err;
    load_backup = lb; load_panic = lp;
    d = s1; #200;
    clk1 = e1;
    if (e1) m1 = lb ? m3 : s1;
    #100 d = v; #(PHI1 - 200) d = s2; #100;
    clk2 = e2;
    if (e2) m2 = lb ? m3 : s2;
    #100 d = v;
    exp_err = |(m1 ^ m2);
    check(W'(stage_error), W'(exp_err), "stage_error");
    check(q, m1, "q");
    e3 = (e3mode == 1) || (e3mode == 2 && !stage_error);
    #(PHI2 - 200) d = s3; #100;
    clk3 = e3;
    if (e3) m3 = lp ? m2 : s3;
    #100 d = v;
    check(W'(stage_panic), W'(|((m2 ^ m3) & ~(m1 ^ m2))), "stage_panic");
    #(T/2 - PHI1 - PHI2 - 200) clk1 = 0;
    #(PHI1) clk2 = 0;
    #(PHI2) clk3 = 0;
    #(T - T/2 - PHI1 - PHI2 - 200);
  endtask

  initial begin : watchdog
    #(T * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, s1, s2, s3, late, one;
    int c;
    late = '0;
    cyc('0, '0, '0, '0, 1, 1, 1, 0, 0);
    m1 = '0; m2 = '0; m3 = '0; prev = '0;
    cyc('0, '0, '0, '0, 1, 1, 1, 0, 0);
    for (int it = 0; it < 500; it++) begin
      v = W'($urandom);
      c = (it < 12) ? (it % 6) : int'($urandom_range(0, 5));
      one = W'(1) << $urandom_range(0, W-1);
      if (c == 4 || c == 5) begin
        // bits that arrive late: at least one, at least two for case VI
        late = W'($urandom) | one;
        if (c == 5) late = late | (one << 1) | (one >> 1);
        prev = v ^ late;
        cyc(prev, prev, prev, prev, 1, 1, 2, 0, 0);   // checkpoint = prev
      end
      s1 = v; s2 = v; s3 = v;
      case (c)
        1: s1 = v ^ one;                     // II  SE in R1
        2: s2 = v ^ one;                     // III SE in R2
        3: s3 = v ^ one;                     // IV  SE in R3
        4: s1 = prev;                        // V   TE in R1
        5: begin                             // VI  TE in R1, SE in R2 on
             s1 = prev;                      //     one of the late bits
             s2 = v ^ (late & -late);
           end
        default: ;
      endcase
      cyc(v, s1, s2, s3, 1, 1, 2, 0, 0);
      if (stage_error) begin
        n_case[c]++;
        cyc(v, v, v, v, 1, 1, 0, 1, 0);      // Load_Backup
        check(W'(stage_error), '0, "error cleared after backup");
        check(q, prev, "rolled back to checkpoint");
        cyc(v, v, v, v, 0, 0, 0, 0, 0);      // re-computation stall
        cyc(v, v, v, v, 0, 0, 0, 0, 0);
        cyc(v, v, v, v, 1, 1, 2, 0, 0);      // re-computed
        check(q, v, "re-computed word");
      end else if (stage_panic) begin
        n_case[c]++;
        check(q, v, "word kept under panic");
        cyc(v, v, v, v, 0, 0, 1, 0, 1);      // Load_Panic
        check(W'(stage_panic), '0, "panic cleared");
      end else begin
        check(q, v, "word");
      end
      check(W'(stage_error | stage_panic), '0, "clean after cycle");
      prev = v;
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (n_case[k] == 0) begin
        failures++;
        $display("FAIL scenario %0d never flagged", k);
      end
    end
    $display("flagged: II=%0d III=%0d IV=%0d V=%0d VI=%0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
