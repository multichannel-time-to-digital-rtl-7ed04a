// tb_tdc_channel: one full channel at its default size (50 CARRY4s).
// External hits are placed at known times before a sampling edge. Checks:
// one time stamp per hit, three clocks after the sampling edge; the fine code
// grows with the elapsed time and is close to the count of taps both
// transitions of the wave union crossed; the external input is ignored in
// code-density mode and the code-density clock in measurement mode; with an
// identity calibration table every stamp's fine code is counted once (1.0)
// in its own L-histogram bin.
module tb_tdc_channel;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam real T = 3300.0;
  logic      clk = 0, rst_n = 0, ext_hit = 0, cd_clk = 0, cd_mode = 0;
  logic      cal_we = 0, rd_req = 0, rd_valid, clr = 0, clr_busy, stamp_valid;
  fine_t     cal_addr = 0, rd_addr = 0;
  cal_word_t cal_data = '0;
  hist_rd_t  rd_data;
  stamp_t    stamp;
  int        edges = 0, stamps = 0, last_stamp_edge = 0;
  stamp_t    last_stamp;
  int        code_count [512];
  int checks = 0, failures = 0;

  tdc_channel #(.SEED(3)) dut (.*);

  always #(T / 2) clk = ~clk;
  always @(posedge clk) begin
    edges++;
    if (rst_n && stamp_valid) begin
      stamps++;
      last_stamp = stamp;
      last_stamp_edge = edges;
      code_count[stamp.fine]++;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hit 'phi' ps before the next rising clock edge; returns that edge's number
  task automatic hit_before_edge(input real phi, output int e0);
    @(posedge clk);
    #(T - phi);
    ext_hit = 1;
    e0 = edges + 1;
    #(phi + 2000.0);
    ext_hit = 0;
    repeat (6) @(posedge clk);
    #1;
  endtask

  initial begin
    int e0, s0, prev_fine, expect_fine;
    real phi;
    for (int k = 0; k < 512; k++) code_count[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // identity calibration table
    for (int k = 0; k < 512; k++) begin
      @(negedge clk); cal_we = 1; cal_addr = fine_t'(k);
      cal_data = '{addr_l: fine_t'(k), addr_m: '0, addr_r: '0, coe_l: 9'd256, coe_m: '0, coe_r: '0};
    end
    @(negedge clk); cal_we = 0;
    while (clr_busy) @(negedge clk);
    for (int k = 0; k < 512; k++) code_count[k] = 0;
    stamps = 0;
    // sweep the hit phase over one period
    prev_fine = -1;
    for (int i = 0; i < 60; i++) begin
      phi = 100.0 + 52.0 * i;
      s0 = stamps;
      hit_before_edge(phi, e0);
      check(stamps == s0 + 1, "one stamp per hit");
      // valid in the clock after edge e0+3, so seen at edge e0+4
      check(last_stamp_edge == e0 + 4, $sformatf("stamp three clocks after sampling (%0d)",
                                                 last_stamp_edge - e0));
      check(int'(last_stamp.fine) >= prev_fine, "fine code grows with elapsed time");
      expect_fine = int'(phi / 20.0) + ((phi > 300.0) ? int'((phi - 300.0) / 22.0) : 0);
      check(int'(last_stamp.fine) > expect_fine - 20 && int'(last_stamp.fine) < expect_fine + 20,
            $sformatf("fine code %0d near %0d", last_stamp.fine, expect_fine));
      prev_fine = int'(last_stamp.fine);
    end
    // mode switch: external input ignored in code-density mode
    cd_mode = 1;
    s0 = stamps;
    hit_before_edge(1000.0, e0);
    check(stamps == s0, "external input ignored in code-density mode");
    repeat (6) begin
      #(T * 2.37); cd_clk = 1; #(T * 2.37); cd_clk = 0;
    end
    repeat (5) @(posedge clk);
    check(stamps == s0 + 6, "code-density clock measured in code-density mode");
    cd_mode = 0;
    s0 = stamps;
    #(T * 2.1); cd_clk = 1; #(T * 2.1); cd_clk = 0;
    repeat (5) @(posedge clk);
    check(stamps == s0, "code-density clock ignored in measurement mode");
    // histogram: every stamp counted in its own bin
    for (int k = 0; k < 512; k++) begin
      @(negedge clk); rd_req = 1; rd_addr = fine_t'(k);
      @(negedge clk); rd_req = 0;
      while (!rd_valid) @(negedge clk);
      if (code_count[k] != 0 || rd_data.l != 0) begin
        check(rd_data.l == 32'(code_count[k] * 256) && rd_data.m == 0 && rd_data.r == 0,
              $sformatf("bin %0d holds %0d hits", k, code_count[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
