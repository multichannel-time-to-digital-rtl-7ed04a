// tb_fine_code_sum: drives random encoder codes and sub-TDL activity and
// checks, one clock later, that the fine code is the sum of all rising and
// falling codes and that a hit is flagged only on the first non-empty sample
// after an empty one.
module tb_fine_code_sum;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 0, rst_n = 0;
  logic [5:0] rise_code [4], fall_code [4];
  logic [3:0] any;
  logic       fine_valid;
  logic [8:0] fine_code;
  int exp_sum;
  bit exp_valid, prev_any;
  int checks = 0, failures = 0, hits = 0;

  fine_code_sum #(.N_SUB(4), .CODE_W(6), .FINE_W(9)) dut (.*);
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    any = 0;
    for (int k = 0; k < 4; k++) begin rise_code[k] = 0; fall_code[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_any = 0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      exp_sum = 0;
      for (int k = 0; k < 4; k++) begin
        rise_code[k] = 6'($urandom % 51);
        fall_code[k] = 6'($urandom % 51);
        exp_sum += rise_code[k] + fall_code[k];
      end
      any = ($urandom % 3 == 0) ? 4'b0 : 4'($urandom);
      exp_valid = (any != 0) && !prev_any;
      prev_any  = (any != 0);
      @(posedge clk); #1;
      checks += 2;
      if (fine_code !== 9'(exp_sum)) begin
        failures++; $display("FAIL sum %0d expected %0d", fine_code, exp_sum);
      end
      if (fine_valid !== exp_valid) begin
        failures++; $display("FAIL valid %b expected %b", fine_valid, exp_valid);
      end
      if (exp_valid) hits++;
    end
    checks++; if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
