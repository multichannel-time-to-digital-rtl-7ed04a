// tb_falling_encoder: feeds wave-union patterns (zeros, a run of ones from tap a
// up to tap b-1, zeros) and empty patterns, and checks that the code is
// the number of zeros below the lowest one (0 when empty), one clock later.
module tb_falling_encoder;
  timeunit 1ps; timeprecision 1fs;
  localparam int N = 50;
  logic clk = 0;
  logic [N-1:0] therm;
  logic [5:0]   code_q;
  
  int checks = 0, failures = 0;

  falling_encoder #(.N(N)) dut (.clk, .therm, .code_q);
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = $urandom % (N + 1);
      b = a + $urandom % (N + 1 - a);
      if (i < 3) begin a = i; b = i; end          // empty patterns
      if (i == 3) begin a = 0; b = N; end        // all ones
      therm = '0;
      for (int j = a; j < b; j++) therm[j] = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (code_q !== 6'(((b > a) ? ((b > a) ? a : 0) : 0))) begin
        failures++;
        $display("FAIL a=%0d b=%0d code=%0d", a, b, code_q);
      end
      
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
