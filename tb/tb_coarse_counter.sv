// tb_coarse_counter: checks reset to zero, counting by one per enabled clock,
// holding while disabled, and wrap-around of a narrow counter.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] count;
  logic [W-1:0] ref_cnt;
  int checks = 0, failures = 0;

  coarse_counter #(.WIDTH(W)) dut (.*);
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cnt = 0;
    repeat (3) @(posedge clk);
    checks++; if (count !== 0) failures++;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) ref_cnt++;
      #1;
      checks++;
      if (count !== ref_cnt) begin
        failures++;
        $display("FAIL cycle %0d count=%0d expected %0d", i, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
