// tb_axi_lite_regs: acts as an AXI4-Lite master. Checks the control fields,
// the single-clock strobes for clear, factor write and histogram read-out,
// the factor word assembled from two registers, read-back of registers, the
// capture of read-out data with its status bit, and that write responses wait
// for bready (response held while the master stalls).
module tb_axi_lite_regs;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  s_awaddr = 0, s_araddr = 0;
  logic        s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [1:0]  s_bresp, s_rresp;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [7:0]  ch_sel;
  logic        cd_mode, clr, clr_busy = 0, cal_we, rd_req, rd_valid = 0;
  fine_t       cal_addr, rd_addr;
  cal_word_t   cal_data;
  hist_rd_t    rd_data = '0;
  int checks = 0, failures = 0;
  int n_clr = 0, n_cal = 0, n_rd = 0;
  cal_word_t last_cal;
  fine_t     last_cal_addr, last_rd_addr;

  axi_lite_regs dut (.*);
  always #5000 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && clr) n_clr++;
    if (rst_n && cal_we) begin n_cal++; last_cal = cal_data; last_cal_addr = cal_addr; end
    if (rst_n && rd_req) begin n_rd++; last_rd_addr = rd_addr; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input int bdelay = 0);
    @(negedge clk); s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1; s_bready = 0;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    repeat (bdelay) begin @(negedge clk); check(s_bvalid, "bvalid held"); end
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    check(s_bresp == 2'b00, "OKAY write response");
    @(negedge clk); s_bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1; s_rready = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk); s_rready = 0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wr(8'h00, 32'h0000_0105, 3);
    check(ch_sel == 5 && cd_mode == 1, "CTRL fields");
    rd(8'h00, d); check(d == 32'h105, "CTRL read-back");
    wr(8'h04, 32'd1);
    check(n_clr == 1, $sformatf("one clear strobe (%0d)", n_clr));
    clr_busy = 1; rd(8'h08, d); check(d[0] == 1, "clear busy status"); clr_busy = 0;
    for (int i = 0; i < 20; i++) begin
      logic [8:0] k, al, am, ar, cl, cm, cr;
      k = 9'($urandom); al = 9'($urandom); am = 9'($urandom); ar = 9'($urandom);
      cl = 9'($urandom); cm = 9'($urandom); cr = 9'($urandom);
      wr(8'h0C, 32'(k));
      wr(8'h10, {5'd0, al, am, ar});
      check(n_cal == i, "no factor write before CAL_COES");
      wr(8'h14, {5'd0, cl, cm, cr});
      check(n_cal == i + 1, "one factor write strobe");
      check(last_cal_addr == k && last_cal.addr_l == al && last_cal.addr_m == am &&
            last_cal.addr_r == ar && last_cal.coe_l == cl && last_cal.coe_m == cm &&
            last_cal.coe_r == cr, "factor word");
    end
    wr(8'h18, 32'd77);
    check(n_rd == 1 && last_rd_addr == 77, "read-out strobe and address");
    rd(8'h08, d); check(d[1] == 0, "read-out not yet valid");
    @(negedge clk); rd_valid = 1; rd_data = '{l: 32'd11, m: 32'd22, r: 32'd33};
    @(negedge clk); rd_valid = 0;
    rd(8'h08, d); check(d[1] == 1, "read-out valid");
    rd(8'h1C, d); check(d == 11, "HIST_L");
    rd(8'h20, d); check(d == 22, "HIST_M");
    rd(8'h24, d); check(d == 33, "HIST_R");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
