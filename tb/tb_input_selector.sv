// tb_input_selector: checks that the input selector passes the code-density
// clock in code-density mode and the external input otherwise, for all input
// combinations and for a stream of random ones.
module tb_input_selector;
  timeunit 1ps; timeprecision 1fs;
  logic ext_hit, cd_clk, cd_mode, hit;
  int checks = 0, failures = 0;

  input_selector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {ext_hit, cd_clk, cd_mode} = (i < 8) ? 3'(i) : 3'($urandom);
      #10;
      checks++;
      if (hit !== (cd_mode ? cd_clk : ext_hit)) begin
        failures++;
        $display("FAIL ext=%b cd=%b mode=%b hit=%b", ext_hit, cd_clk, cd_mode, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
