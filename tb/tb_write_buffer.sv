// tb_write_buffer: self-checking test of the commit-gated result buffer.
// Random commit, valid and data are presented each cycle; after every
// falling clock edge the write strobe must equal commit-and-valid and the
// data must be the last committed valid word.
module tb_write_buffer;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, commit = 0, valid_in = 0;
  logic [W-1:0] data_in = '0, data_out;
  logic valid_out;
  logic [W-1:0] exp_data;
  int checks = 0, failures = 0, n_writes = 0;

  write_buffer #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_v;
    exp_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      commit   = ($urandom_range(0, 3) != 0);
      valid_in = ($urandom_range(0, 4) != 0);
      data_in  = W'($urandom);
      exp_v = commit && valid_in;
      if (exp_v) exp_data = data_in;
      @(negedge clk);
      #1;
      checks += 2;
      if (valid_out !== exp_v) begin
        failures++; $display("FAIL valid_out %b exp %b", valid_out, exp_v);
      end
      if (data_out !== exp_data) begin
        failures++; $display("FAIL data_out %h exp %h", data_out, exp_data);
      end
      if (exp_v) n_writes++;
    end
    checks++;
    if (n_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
