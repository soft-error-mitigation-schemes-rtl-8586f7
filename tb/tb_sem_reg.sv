// tb_sem_reg: self-checking test of a W-bit SEM stage register.
//
// Per cycle a correct word v is driven and a transient is injected on one
// random bit just before the CLK1, CLK2 or CLK3 edge. A per-bit model of
// R1/R2/R3 gives the expected OR-ed stage signals: stage_recover (some bit
// has Error and not Benign), stage_error and stage_benign. The test plays
// the clock control: on stage_recover the next cycle has LBkup high and
// only CLK1 running, after which the word must be correct again.
module tb_sem_reg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PHI1 = 1000, PHI2 = 1000, T = 9000;
  localparam int W = 8;

  logic clk1 = 0, clk2 = 0, clk3 = 0;
  logic load_backup = 0;
  logic [W-1:0] d = '0, q;
  logic stage_recover, stage_error, stage_benign;

  int checks = 0, failures = 0;
  int n_case[4];
  logic [W-1:0] m1, m2, m3;

  sem_reg #(.W(W)) dut (.*);

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cyc(input logic [W-1:0] v, s1, s2, s3, input bit e1, e2, e3, lb);
    load_backup = lb;
    d = s1; #200;
    clk1 = e1;
    if (e1) m1 = lb ? m3 : s1;
    #100 d = v; #(PHI1 - 200) d = s2; #100;
    clk2 = e2;
    if (e2) m2 = s2;
    #100 d = v;
    check(W'(stage_error), W'(|(m1 ^ m2)), "stage_error");
    check(q, m1, "q");
    #(PHI2 - 200) d = s3; #100;
    clk3 = e3;
    if (e3) m3 = s3;
    #100 d = v;
    check(W'(stage_benign), W'(|(m2 ^ m3)), "stage_benign");
    check(W'(stage_recover), W'(|((m1 ^ m2) & ~(m2 ^ m3))), "stage_recover");
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
    logic [W-1:0] v, s1, s2, s3, one;
    int c;
    cyc('0, '0, '0, '0, 1, 1, 1, 0);
    m1 = '0; m2 = '0; m3 = '0;
    cyc('0, '0, '0, '0, 1, 1, 1, 0);
    for (int it = 0; it < 500; it++) begin
      v = W'($urandom);
      c = (it < 8) ? (it % 4) : int'($urandom_range(0, 3));
      one = W'(1) << $urandom_range(0, W-1);
      s1 = v; s2 = v; s3 = v;
      case (c)
        1: s1 = v ^ one;   // R1 corrupted: recovery
        2: s2 = v ^ one;   // R2 corrupted: false positive
        3: s3 = v ^ one;   // R3 corrupted: benign
        default: ;
      endcase
      cyc(v, s1, s2, s3, 1, 1, 1, 0);
      check(W'(stage_recover), W'(c == 1), "recover only for R1 errors");
      if (stage_recover) begin
        n_case[c]++;
        cyc(v, v, v, v, 1, 0, 0, 1);
        check(q, v, "word repaired");
        check(W'(stage_recover | stage_error), '0, "clean after repair");
      end else begin
        if (stage_error || stage_benign) n_case[c]++;
        check(q, v, "forwarded word");
      end
    end
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (n_case[k] == 0) begin
        failures++;
        $display("FAIL scenario %0d never seen", k);
      end
    end
    $display("cases: R1=%0d R2=%0d R3=%0d", n_case[1], n_case[2], n_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
