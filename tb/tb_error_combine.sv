// tb_error_combine: self-checking test of the global error OR network.
// Applies all single-stage errors, no error, and random patterns to a
// four-input instance (the default width) and compares with a loop-computed OR.
module tb_error_combine;
  localparam int N = 4;
  logic [N-1:0] stage_err;
  logic         global_err;
  int checks = 0, failures = 0;

  error_combine dut (.*);

  task automatic apply(input logic [N-1:0] v);
    bit exp;
    stage_err = v;
    #1;
    exp = 1'b0;
    for (int i = 0; i < N; i++) if (v[i]) exp = 1'b1;
    checks++;
    if (global_err !== exp) begin
      failures++;
      $display("FAIL stage_err=%b global_err=%b", v, global_err);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    for (int i = 0; i < N; i++) apply(N'(1) << i);
    for (int i = 0; i < 200; i++) apply(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
