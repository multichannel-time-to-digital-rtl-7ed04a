// tdc_system_flow.svh: body shared by the system testbenches. The including
// module declares N_CH (channels), NH (hits per code-density test) and
// instantiates the system as `dut` and the processor model as `ps`.
//
// Flow (automatic calibration, then a check of the result):
//   1. reset; the histogram clear that follows reset must finish;
//   2. load identity factors into every channel, clear, run a code-density
//      test with NH hits; read every raw histogram and check it holds exactly
//      the hits the channel time-stamped;
//   3. compute and load the weighted-histogram factors of every channel;
//   4. clear and run a second code-density test, reading bins of channel 0
//      while hits arrive (read-out must wait for the busy RAM port);
//   5. read the calibrated histograms: all hits accounted for (within the
//      weight rounding), peak-to-peak DNL below 0.8 LSB and INL below 1.5 LSB
//      per channel, averages below 0.5 and 1 LSB, and both below a quarter
//      of the raw values;
//   6. measurement mode: external hits reach only their own channel.
// Every mechanism (clear, mode switch, factor load, the three mapping cases,
// read-out stall, channel selection) is counted and must have happened.

  localparam real T_PS = 3300.0;
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
  int stamps [N_CH];
  int n_clear = 0, n_mode_switch = 0, n_stall = 0, n_sel = 0;
  real raw_dnl [N_CH], raw_inl [N_CH], cal_dnl [N_CH], cal_inl [N_CH];
  real avg_dnl = 0, avg_inl = 0;

  always #(T_PS / 2) clk = ~clk;

  always @(posedge clk)
    if (rst_n)
      for (int c = 0; c < N_CH; c++) if (stamp_valid[c]) stamps[c]++;

  always @(posedge clk)
    if (rst_n && dut.g_ch[0].u_ch.u_wh.u_hist_l.rd_pend &&
        dut.g_ch[0].u_ch.u_wh.u_hist_l.take_acc) n_stall++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic code_density(input int nh, input bit read_during);
    int s0 = stamps[0];
    real l, m, r;
    ps.cd_run = 1;
    n_mode_switch++;
    while (stamps[0] < s0 + nh) begin
      if (read_during && stamps[0] < s0 + nh / 2) begin
        ps.select(0, 1);
        ps.read_bin(($urandom % 300), l, m, r);
      end else repeat (100) @(posedge clk);
    end
    ps.cd_run = 0;
    repeat (10) @(posedge clk);
  endtask

  task automatic clear_all(input bit cd_mode);
    for (int c = 0; c < N_CH; c++) begin ps.clear_hist(c, cd_mode); n_clear++; end
  endtask

  initial begin
    #(T_PS * 60000000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    real tot, first, last;
    int  kmin, kmax, s_before [N_CH];
    for (int c = 0; c < N_CH; c++) stamps[c] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. clear after reset
    for (int c = 0; c < N_CH; c++) begin
      ps.select(c, 0);
      n_sel++;
      do ps.axi_read(8'h08, st); while (st[0]);
    end
    check(1, "reset clear finished");
    // 2. raw code-density test
    for (int c = 0; c < N_CH; c++) ps.load_identity(c, 1);
    clear_all(1);
    for (int c = 0; c < N_CH; c++) stamps[c] = 0;
    code_density(NH, 0);
    for (int c = 0; c < N_CH; c++) begin
      ps.read_hist(c, 1, 512);
      tot = 0; kmin = 512; kmax = -1;
      for (int k = 0; k < 512; k++) begin
        tot += ps.hist_l[k] + ps.hist_m[k] + ps.hist_r[k];
        if (ps.hist_l[k] > 0) begin if (k < kmin) kmin = k; kmax = k; end
      end
      check(tot == real'(stamps[c]), $sformatf("ch %0d raw histogram holds %0.1f of %0d hits",
                                                c, tot, stamps[c]));
      raw_dnl[c] = ps.dnl_pkpk(kmin, kmax - kmin + 1);
      raw_inl[c] = ps.inl_pkpk(kmin, kmax - kmin + 1);
      // 3. factors
      ps.calibrate(c, 1);
      $display("ch %0d: %0d codes used (%0d..%0d), %0d ideal bins, raw DNL pk-pk %0.2f INL pk-pk %0.2f",
               c, kmax - kmin + 1, kmin, kmax, ps.n_ideal, raw_dnl[c], raw_inl[c]);
      s_before[c] = ps.n_ideal;
    end
    // 4. calibrated code-density test with read-out during acquisition
    clear_all(1);
    for (int c = 0; c < N_CH; c++) stamps[c] = 0;
    code_density(NH, 1);
    // 5. calibrated histograms
    for (int c = 0; c < N_CH; c++) begin
      ps.read_hist(c, 1, s_before[c]);
      tot = 0;
      for (int k = 0; k < s_before[c]; k++) tot += ps.hist_l[k] + ps.hist_m[k] + ps.hist_r[k];
      check(tot > 0.97 * stamps[c] && tot < 1.03 * stamps[c],
            $sformatf("ch %0d calibrated histogram holds %0.1f of %0d hits", c, tot, stamps[c]));
      // edge bins absorb the wrap of the first and last actual bin: skip one each side
      cal_dnl[c] = ps.dnl_pkpk(1, s_before[c] - 2);
      cal_inl[c] = ps.inl_pkpk(1, s_before[c] - 2);
      $display("ch %0d: calibrated DNL pk-pk %0.2f INL pk-pk %0.2f", c, cal_dnl[c], cal_inl[c]);
      check(cal_dnl[c] < 0.8 && cal_dnl[c] < 0.25 * raw_dnl[c], $sformatf("ch %0d DNL improved", c));
      check(cal_inl[c] < 1.5 && cal_inl[c] < 0.25 * raw_inl[c], $sformatf("ch %0d INL improved", c));
      avg_dnl += cal_dnl[c] / N_CH;
      avg_inl += cal_inl[c] / N_CH;
    end
    $display("average calibrated DNL pk-pk %0.2f, INL pk-pk %0.2f LSB", avg_dnl, avg_inl);
    check(avg_dnl < 0.5 && avg_inl < 1.0, "average linearity");
    // 6. measurement mode: external hits
    ps.select(0, 0);
    n_mode_switch++;
    for (int c = 0; c < N_CH; c++) s_before[c] = stamps[c];
    for (int c = 0; c < N_CH; c++) begin
      @(posedge clk); #(T_PS * 0.37 + 11.0 * c);
      ext_hit[c] = 1; #(T_PS * 2); ext_hit[c] = 0;
      repeat (6) @(posedge clk);
      for (int d = 0; d < N_CH; d++)
        check(stamps[d] == s_before[d] + ((d <= c) ? 1 : 0),
              $sformatf("external hit on ch %0d seen on ch %0d only", c, d));
    end
    // mechanisms
    $display("clears %0d, mode switches %0d, factor words %0d, case A/B/C %0d/%0d/%0d, read-out stalls %0d, channel selections %0d",
             n_clear, n_mode_switch, ps.cal_words, ps.case_a, ps.case_b, ps.case_c, n_stall, n_sel);
    check(n_clear > 0, "clear happened");
    check(n_mode_switch >= 3, "mode switches happened");
    check(ps.cal_words >= 2 * 512 * N_CH, "factor loads happened");
    check(ps.case_a > 0, "bins mapped to one ideal bin");
    check(ps.case_b > 0, "bins mapped to two ideal bins");
    check(ps.case_c > 0, "bins mapped to three ideal bins");
    check(n_stall > 0, "read-out stall happened");
    check(n_sel == N_CH, "every channel selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ps_model #(.N_CH(N_CH)) ps (
    .clk, .cd_clk, .awaddr, .awvalid, .awready, .wdata, .wvalid, .wready,
    .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rvalid, .rready);
