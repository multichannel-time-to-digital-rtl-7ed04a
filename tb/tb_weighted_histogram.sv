// tb_weighted_histogram: loads a random calibration table, sends a stream of
// fine codes (up to one per clock), and checks every bin of the L, M and R
// histograms against a reference that adds Coe X[k] to bin Addr X[k] for each
// code k. Also checks the latency from a fine code to its histogram write.
module tb_weighted_histogram;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int DEPTH = 64;
  logic       clk = 0, rst_n = 0;
  logic       fine_valid = 0, cal_we = 0, rd_req = 0, rd_valid, clr = 0, clr_busy, fwd;
  logic [5:0] fine_code = 0, cal_addr = 0, rd_addr = 0;
  cal_word_t  cal_data;
  hist_rd_t   rd_data;
  cal_word_t  tab [DEPTH];
  longint     rl [DEPTH], rm [DEPTH], rr [DEPTH];
  int checks = 0, failures = 0;

  weighted_histogram #(.DEPTH(DEPTH)) dut (.*);
  always #5000 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, t0;
    cal_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < DEPTH; k++) begin
      tab[k] = '{addr_l: 9'($urandom % DEPTH), addr_m: 9'($urandom % DEPTH),
                 addr_r: 9'($urandom % DEPTH), coe_l: 9'($urandom % 257),
                 coe_m: 9'($urandom % 257), coe_r: 9'(($urandom % 2) ? 0 : $urandom % 257)};
      @(negedge clk); cal_we = 1; cal_addr = 6'(k); cal_data = tab[k];
      rl[k] = 0; rm[k] = 0; rr[k] = 0;
    end
    @(negedge clk); cal_we = 0;
    while (clr_busy) @(negedge clk);
    // latency of one isolated hit: L bank bin written two clocks after the
    // calibration word is read, i.e. three clocks after fine_valid
    @(negedge clk); fine_valid = 1; fine_code = 6'd5;
    t0 = 0;
    @(negedge clk); fine_valid = 0;
    lat = 1;
    while (!(dut.u_hist_l.s1_acc) && lat < 10) begin @(negedge clk); lat++; end
    lat++;  // written at the end of the write-back clock
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d clocks", lat); end
    rl[tab[5].addr_l] += tab[5].coe_l; rm[tab[5].addr_m] += tab[5].coe_m; rr[tab[5].addr_r] += tab[5].coe_r;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      fine_valid = ($urandom % 4) != 0;
      fine_code  = 6'($urandom % DEPTH);
      if (fine_valid) begin
        rl[tab[fine_code].addr_l] += tab[fine_code].coe_l;
        rm[tab[fine_code].addr_m] += tab[fine_code].coe_m;
        rr[tab[fine_code].addr_r] += tab[fine_code].coe_r;
      end
    end
    @(negedge clk); fine_valid = 0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); rd_req = 1; rd_addr = 6'(k);
      @(negedge clk); rd_req = 0;
      while (!rd_valid) @(negedge clk);
      checks += 3;
      if (rd_data.l !== 32'(rl[k]) || rd_data.m !== 32'(rm[k]) || rd_data.r !== 32'(rr[k])) begin
        failures++;
        $display("FAIL bin %0d: %0d %0d %0d expected %0d %0d %0d", k,
                 rd_data.l, rd_data.m, rd_data.r, rl[k], rm[k], rr[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
