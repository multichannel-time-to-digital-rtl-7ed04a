// tb_tdl_carry4: launches transitions into the delay-line model at known
// times before a sampling edge and checks the sampled taps: an idle line reads
// all zeros; a single 0-1 transition that has travelled for tau reaches about
// tau / MEAN_PS taps, grows with tau and leaves every sub-TDL (taps 4j+k) a
// clean thermometer code; a wave-union pulse leaves a run of ones whose lower
// end tracks the trailing 1-0 transition.
module tb_tdl_carry4;
  timeunit 1ps; timeprecision 1fs;
  localparam int  N  = 50;
  localparam int  NT = 4 * N;
  localparam real MEAN = 20.0;
  logic clk = 0, chain_in = 0;
  logic [NT-1:0] taps_q;
  int checks = 0, failures = 0;

  tdl_carry4 #(.N_CARRY4(N), .SEED(7), .MEAN_PS(MEAN), .SPREAD_PS(10.0),
               .FALL_RATIO(1.1), .SKEW_PS(3.0)) dut (.clk, .chain_in, .taps_q);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int ones(input logic [NT-1:0] t);
    int n = 0;
    for (int e = 0; e < NT; e++) n += t[e];
    return n;
  endfunction

  function automatic bit sub_thermometer(input logic [NT-1:0] t);
    // from tap 0 up: zeros, ones, zeros in every sub-TDL
    for (int k = 0; k < 4; k++) begin
      int state = 0;
      for (int j = 0; j < N; j++) begin
        logic b = t[4 * j + k];
        if (state == 0 && b) state = 1;
        else if (state == 1 && !b) state = 2;
        else if (state == 2 && b) return 0;
      end
    end
    return 1;
  endfunction

  task automatic sample_after(input real tau, input real pw);
    // transition(s) at t0, sampling edge at t0 + tau
    chain_in = 1;
    if (pw > 0 && pw < tau) begin #(pw); chain_in = 0; #(tau - pw); end
    else #(tau);
    clk = 1;
    #1; clk = 0;
    #1;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, n, lo;
    real tau;
    #1000;
    clk = 1; #1; clk = 0; #1;
    check(taps_q == '0, "idle line is empty");
    prev = -1;
    for (int i = 0; i < 40; i++) begin
      tau = 60.0 + 90.0 * i;             // up to 3.6 ns, inside the line
      chain_in = 0; #10000;
      sample_after(tau, 0.0);
      n = ones(taps_q);
      check(n >= prev, "tap count grows with elapsed time");
      check(n > int'(tau / MEAN) - 12 && n < int'(tau / MEAN) + 12, $sformatf(
            "tap count %0d near tau/MEAN=%0d", n, int'(tau / MEAN)));
      check(sub_thermometer(taps_q), "sub-TDLs free of bubbles");
      prev = n;
    end
    for (int i = 0; i < 20; i++) begin
      tau = 1000.0 + 120.0 * i;
      chain_in = 0; #10000;
      sample_after(tau, 300.0);
      n = ones(taps_q);
      lo = 0;
      while (lo < NT && !taps_q[lo]) lo++;
      check(n > 0 && sub_thermometer(taps_q), "wave-union pulse sampled cleanly");
      // ones lie between the trailing and the leading transition
      check(n > int'(tau / MEAN - (tau - 300.0) / (MEAN * 1.1)) - 10 &&
            n < int'(tau / MEAN - (tau - 300.0) / (MEAN * 1.1)) + 10, $sformatf("pulse length %0d taps", n));
      check(lo > int'((tau - 300.0) / MEAN / 1.1) - 14 && lo < int'((tau - 300.0) / MEAN / 1.1) + 14,
            $sformatf("trailing transition at tap %0d", lo));
    end
    chain_in = 0; #20000;
    clk = 1; #1; clk = 0; #1;
    check(taps_q == '0, "line empties after the pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
