// tb_tdc_time_interval: time-interval (precision) test of one calibrated
// channel, after the published evaluation: 30 measurements that step the delay
// between the sampling clock and the hit across one clock period, each with
// 100 000 hits.
//
// The channel is first calibrated automatically (identity factors, raw
// code-density test, factors computed and loaded by the processor model).
// Then, in measurement mode, every hit is launched a fixed delay d after a
// sampling edge plus a Gaussian jitter of JIT_PS (this testbench's stand-in
// for the programmable delay and for clock and input noise; the delay line
// model itself is noiseless). After each measurement the calibrated
// histogram (L + M + R) is read back, and its mean and standard deviation
// are converted to picoseconds with one ideal bin = T / (ideal bins).
// Checks, per measurement: every hit is time-stamped once, the histogram
// holds hits (its total is the sum of the width factors of the few codes hit,
// which differs from the hit count where a code carries part of a wide
// neighbour), and the standard deviation is between 0.5 and 2.5 times the
// expected sqrt(JIT^2 + LSB^2/12) (the upper margin covers those codes, whose
// extra weight widens the histogram); over all 30: the mean code falls by one
// ideal bin per LSB of added delay (slope within 3 %), no mean departs more
// than 1.5 LSB from the fitted line, and the average standard deviation is
// below 13.86 ps, the RMS resolution reported for the hardware.
module tb_tdc_time_interval;
  timeunit 1ps; timeprecision 1fs;
  localparam int  N_CH   = 1;
  localparam int  NH_CD  = 40000;   // code-density hits for the calibration
  localparam int  N_MEAS = 30;
  localparam int  NS     = 100000;  // hits per measurement
  localparam real T_PS   = 3300.0;
  localparam real JIT_PS = 5.0;

  logic clk = 0, rst_n = 0;
  logic [N_CH-1:0] ext_hit = '0;
  logic cd_clk;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [1:0]  bresp, rresp;
  logic [N_CH-1:0] stamp_valid;
  tdc_pkg::stamp_t stamp [N_CH];

  int checks = 0, failures = 0;
  int stamps = 0;

  always #(T_PS / 2) clk = ~clk;
  always @(posedge clk) if (rst_n && stamp_valid[0]) stamps++;

  tdc_system #(.N_CH(N_CH)) dut (
    .clk, .rst_n, .ext_hit, .cd_clk,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid),
    .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .stamp_valid, .stamp);

  ps_model #(.N_CH(N_CH)) ps (
    .clk, .cd_clk, .awaddr, .awvalid, .awready, .wdata, .wvalid, .wready,
    .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rvalid, .rready);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real uniform();
    return (real'($urandom) + 0.5) / 4294967296.0;
  endfunction

  // Box-Muller
  function automatic real gauss(input real sigma);
    return sigma * $sqrt(-2.0 * $ln(uniform())) * $cos(6.283185307179586 * uniform());
  endfunction

  initial begin
    #(T_PS * 30000000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    int  nb, s0;
    real q, d [N_MEAS], mu [N_MEAS], sd [N_MEAS];
    real tot, m1, m2, h, sx, sy, sxx, sxy, slope, icpt, res, worst, avg_sd, expect_sd;

    repeat (5) @(posedge clk);
    rst_n = 1;
    do ps.axi_read(8'h08, st); while (st[0]);

    // automatic calibration from one code-density test
    ps.load_identity(0, 1);
    ps.clear_hist(0, 1);
    s0 = stamps;
    ps.cd_run = 1;
    while (stamps < s0 + NH_CD) @(posedge clk);
    ps.cd_run = 0;
    repeat (10) @(posedge clk);
    ps.read_hist(0, 1, tdc_pkg::HIST_DEPTH);
    ps.calibrate(0, 1);
    nb = ps.n_ideal;
    q  = T_PS / real'(nb);
    $display("calibrated: %0d ideal bins, LSB %.2f ps", nb, q);

    // 30 time-interval measurements across one clock period
    for (int m = 0; m < N_MEAS; m++) begin
      d[m] = (real'(m) + 0.5) * T_PS / real'(N_MEAS);
      ps.clear_hist(0, 0);
      s0 = stamps;
      for (int i = 0; i < NS; i++) begin
        @(posedge clk);
        #(d[m] + gauss(JIT_PS)) ext_hit[0] = 1'b1;
        #(T_PS / 4) ext_hit[0] = 1'b0;
        repeat (3) @(posedge clk);
      end
      repeat (10) @(posedge clk);
      ps.read_hist(0, 0, nb + 2);
      tot = 0; m1 = 0; m2 = 0;
      for (int n = 0; n < nb + 2; n++) begin
        h = ps.hist_l[n] + ps.hist_m[n] + ps.hist_r[n];
        tot += h; m1 += h * n; m2 += h * n * n;
      end
      mu[m] = m1 / tot;
      sd[m] = $sqrt(m2 / tot - mu[m] * mu[m]) * q;
      $display("delay %7.1f ps: mean bin %7.2f, sigma %5.2f ps, %0.0f hits", d[m], mu[m], sd[m], tot);
      check(stamps - s0 == NS, $sformatf("time stamps %0d of %0d", stamps - s0, NS));
      check(tot > 0.5 * NS && tot < 1.5 * NS, $sformatf("histogram total %0.0f for %0d hits", tot, NS));
      expect_sd = $sqrt(JIT_PS * JIT_PS + q * q / 12.0);
      check(sd[m] > 0.5 * expect_sd && sd[m] < 2.5 * expect_sd,
            $sformatf("sigma %.2f ps, expected about %.2f", sd[m], expect_sd));
    end

    // linearity of the mean against the programmed delay
    sx = 0; sy = 0; sxx = 0; sxy = 0; avg_sd = 0;
    for (int m = 0; m < N_MEAS; m++) begin
      sx += d[m]; sy += mu[m]; sxx += d[m] * d[m]; sxy += d[m] * mu[m]; avg_sd += sd[m];
    end
    avg_sd /= N_MEAS;
    slope = (N_MEAS * sxy - sx * sy) / (N_MEAS * sxx - sx * sx);
    icpt  = (sy - slope * sx) / N_MEAS;
    worst = 0;
    for (int m = 0; m < N_MEAS; m++) begin
      res = mu[m] - (icpt + slope * d[m]);
      if (res < 0) res = -res;
      if (res > worst) worst = res;
    end
    $display("slope %.4f bins/ps (ideal %.4f), worst deviation %.2f LSB, average sigma %.2f ps",
             slope, -1.0 / q, worst, avg_sd);
    check(slope * q < -0.97 && slope * q > -1.03, "one ideal bin per LSB of delay");
    check(worst < 1.5, "mean within 1.5 LSB of the fitted line");
    check(avg_sd < 13.86, "average RMS below the reported 13.86 ps");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
