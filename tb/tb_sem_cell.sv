// tb_sem_cell: self-checking test of one SEM cell against the SEM error
// table: no error, soft error in R1, in R2 or in R3.
//
// The test drives the three clocks one cycle at a time and sets the data
// input, just before each clock edge, to the correct value or to its
// complement (a transient caught by that register only). It plays the
// clock control: when Error is high and Benign low, the next cycle is a
// stall with LBkup high in which only CLK1 runs. A model of R1/R2/R3 gives
// the expected Error, Benign and output; after the repair the output must
// be the correct value.
module tb_sem_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PHI1 = 1000, PHI2 = 1000, T = 9000;

  logic clk1 = 0, clk2 = 0, clk3 = 0;
  logic data_in = 0, load_backup = 0;
  logic data_out, error, benign;

  int checks = 0, failures = 0;
  int n_case[5];
  bit m1, m2, m3;

  sem_cell dut (.*);

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cyc(input bit v, s1, s2, s3, e1, e2, e3, lb);
    load_backup = lb;
    data_in = s1; #200;
    clk1 = e1;
    if (e1) m1 = lb ? m3 : s1;
    #100 data_in = v; #(PHI1 - 200) data_in = s2; #100;
    clk2 = e2;
    if (e2) m2 = s2;
    #100 data_in = v;
    check(error, m1 ^ m2, "error");
    check(data_out, m1, "data_out");
    #(PHI2 - 200) data_in = s3; #100;
    clk3 = e3;
    if (e3) m3 = s3;
    #100 data_in = v;
    check(benign, m2 ^ m3, "benign");
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
    cyc(1'b0, 0, 0, 0, 1, 1, 1, 0);
    m1 = 0; m2 = 0; m3 = 0;
    cyc(1'b0, 0, 0, 0, 1, 1, 1, 0);
    for (int it = 0; it < 600; it++) begin
      v = 1'($urandom);
      c = (it < 8) ? (it % 4) : int'($urandom_range(0, 3));
      s1 = v; s2 = v; s3 = v;
      case (c)
        1: s1 = ~v;   // II  R1 corrupted: recovery
        2: s2 = ~v;   // III R2 corrupted: false positive
        3: s3 = ~v;   // IV  R3 corrupted: benign
        default: ;    // I   no error
      endcase
      cyc(v, s1, s2, s3, 1, 1, 1, 0);
      // signals against the table
      check(error,  (c == 1) || (c == 2), "table error");
      check(benign, (c == 2) || (c == 3), "table benign");
      if (error && !benign) begin
        n_case[c]++;
        cyc(v, v, v, v, 1, 0, 0, 1);     // stall: LBkup, only CLK1
        check(data_out, v, "R1 repaired from R3");
        check(error, 1'b0, "error cleared");
      end else begin
        if (error || benign) n_case[c]++;
        check(data_out, v, "forwarded value correct");
      end
    end
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (n_case[k] == 0) begin
        failures++;
        $display("FAIL scenario %0d never seen", k);
      end
    end
    $display("cases: II=%0d III=%0d IV=%0d", n_case[1], n_case[2], n_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
