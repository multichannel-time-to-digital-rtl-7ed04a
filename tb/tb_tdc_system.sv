// tb_tdc_system: end-to-end test of the TDC system with two channels: the
// complete automatic-calibration flow of tdc_system_flow.svh (raw
// code-density test, factor calculation and load, calibrated code-density
// test, measurement mode).
module tb_tdc_system;
  timeunit 1ps; timeprecision 1fs;
  localparam int N_CH = 2;
  localparam int NH   = 40000;

  tdc_system #(.N_CH(N_CH)) dut (
    .clk, .rst_n, .ext_hit, .cd_clk,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid),
    .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .stamp_valid, .stamp);

  `include "tdc_system_flow.svh"
endmodule
