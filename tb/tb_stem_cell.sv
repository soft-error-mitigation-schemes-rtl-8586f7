// tb_stem_cell: self-checking test of one STEM cell against the error
// scenarios of the STEM table (no error, soft error in R1, R2 or R3, timing
// error in R1). The combined case (timing error in R1 and soft error in R2)
// cannot be flagged by a single bit, where both samples flip to the same
// wrong value; it is tested on a multi-bit stage in tb_stem_reg.
//
// The test drives the three clocks itself, one cycle at a time: the data
// input is set to a per-register value just before each clock edge (the
// correct value, its complement for a soft error, or the previous cycle's
// value for a late-arriving timing error) and returned to the correct
// value just after. It plays the clock control: CLK3 is suppressed when the
// cell flags an error, a Load_Backup cycle and two stalled cycles follow an
// error, a Load_Panic cycle follows a panic. A model of R1/R2/R3 gives the
// expected Error, Panic and data output after every edge.
module tb_stem_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PHI1 = 2000, PHI2 = 1000, T = 9000;

  logic clk1 = 0, clk2 = 0, clk3 = 0;
  logic data_in = 0, load_backup = 0, load_panic = 0;
  logic data_out, error, panic;

  int checks = 0, failures = 0;
  int n_case[7];
  bit m1, m2, m3, prev;

  stem_cell dut (.*);

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // One clock cycle. v: correct value; s1/s2/s3: sampled value seen by each
  // register; e1/e2: clock enables; e3mode 0 off, 1 on, 2 shielded by error.
  task automatic cyc(input bit v, s1, s2, s3, e1, e2, input int e3mode,
                     input bit lb, lp);
    bit e3, exp_err;
    load_backup = lb; load_panic = lp;
    data_in = s1; #200;
    clk1 = e1;
    if (e1) m1 = lb ? m3 : s1;
    #100 data_in = v; #(PHI1 - 200) data_in = s2; #100;
    clk2 = e2;
    if (e2) m2 = lb ? m3 : s2;
    #100 data_in = v;
    exp_err = m1 ^ m2;
    check(error, exp_err, "error");
    check(data_out, m1, "data_out");
    e3 = (e3mode == 1) || (e3mode == 2 && !error);
    #(PHI2 - 200) data_in = s3; #100;
    clk3 = e3;
    if (e3) m3 = lp ? m2 : s3;
    #100 data_in = v;
    check(panic, (m2 ^ m3) & ~exp_err, "panic");
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
    bit v, s1, s2, s3;
    int c;
    // fill all three registers with a known value
    cyc(1'b0, 0, 0, 0, 1, 1, 1, 0, 0);
    m1 = 0; m2 = 0; m3 = 0; prev = 0;
    cyc(1'b0, 0, 0, 0, 1, 1, 1, 0, 0);
    for (int it = 0; it < 600; it++) begin
      v = 1'($urandom);
      c = (it < 10) ? (it % 5) : int'($urandom_range(0, 4));
      s1 = v; s2 = v; s3 = v;
      case (c)
        0: ;                               // I   no error
        1: s1 = ~v;                        // II  SE in R1
        2: s2 = ~v;                        // III SE in R2
        3: s3 = ~v;                        // IV  SE in R3
        4: s1 = prev;                      // V   TE in R1 (late data)
        default: ;
      endcase
      cyc(v, s1, s2, s3, 1, 1, 2, 0, 0);
      if (error) begin
        n_case[c]++;
        // Load_Backup cycle: R1, R2 <= R3, CLK3 held
        cyc(v, v, v, v, 1, 1, 0, 1, 0);
        check(error, 1'b0, "error cleared after backup");
        check(data_out, prev, "R1 rolled back to checkpoint");
        // two re-computation cycles, all clocks stopped
        cyc(v, v, v, v, 0, 0, 0, 0, 0);
        cyc(v, v, v, v, 0, 0, 0, 0, 0);
        // re-computed cycle captures the correct value
        cyc(v, v, v, v, 1, 1, 2, 0, 0);
        check(data_out, v, "re-computed value");
      end else if (panic) begin
        n_case[c]++;
          check(data_out, v, "R1 kept under panic");
        // Load_Panic cycle: R3 <= R2, CLK1/CLK2 held
        cyc(v, v, v, v, 0, 0, 1, 0, 1);
        check(panic, 1'b0, "panic cleared");
      end else begin
        n_case[6]++;
        check(data_out, v, "data_out");
      end
      check(error | panic, 1'b0, "clean after cycle");
      prev = v;
    end
    // every scenario that flags something must have been seen
    for (int k = 1; k <= 4; k++) begin
      checks++;
      if (n_case[k] == 0) begin
        failures++;
        $display("FAIL scenario %0d never flagged", k);
      end
    end
    $display("cases flagged: II=%0d III=%0d IV=%0d V=%0d clean=%0d",
             n_case[1], n_case[2], n_case[3], n_case[4], n_case[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
