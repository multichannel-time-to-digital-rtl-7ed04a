// tdc_system: multichannel wave-union TDC with automatic weighted histogram
// calibration (programmable-logic part).
//
// N_CH independent TDC channels, each a tuned CARRY4 delay line with a
// wave-union launcher, sub-TDL decomposition, encoders, a calibration BRAM
// and three histogram BRAMs, share one AXI4-Lite register interface through
// a channel selector. The processor on the other side of the AXI bus runs the
// automatic calibration: it switches the channels to the code-density test
// clock, clears and collects the raw histograms, computes the address and
// width factors, writes them into each channel's calibration BRAM and then
// switches to measurement. The processor and the code-density clock source are
// outside this module: the AXI port and cd_clk connect to them.
//
// Ports: clk is the sampling clock; ext_hit[c] is channel c's input;
// cd_clk the code-density test clock; stamp_valid[c]/stamp[c] give every
// detected hit as {coarse, fine} three clocks after the sampling edge.
// The channel count and structure follow the published 16-channel design;
// the interface details are this design's choice.
module tdc_system #(
  parameter int N_CH     = tdc_pkg::N_CH_DEF,
  parameter int N_CARRY4 = tdc_pkg::N_CARRY4_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_CH-1:0]    ext_hit,
  input  logic               cd_clk,
  // AXI4-Lite slave, from the processor
  input  logic [7:0]         s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [7:0]         s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // time stamps
  output logic [N_CH-1:0]    stamp_valid,
  output tdc_pkg::stamp_t    stamp [N_CH]
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int SEL_W = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [7:0] ch_sel;
  logic       cd_mode, clr, clr_busy, cal_we, rd_req, rd_valid;
  fine_t      cal_addr, rd_addr;
  cal_word_t  cal_data;
  hist_rd_t   rd_data;

  logic [N_CH-1:0] ch_cal_we, ch_rd_req, ch_clr, ch_rd_valid, ch_clr_busy;
  hist_rd_t        ch_rd_data [N_CH];

  axi_lite_regs u_axi (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .ch_sel, .cd_mode, .clr, .clr_busy, .cal_we, .cal_addr, .cal_data,
    .rd_req, .rd_addr, .rd_valid, .rd_data);

  channel_selector #(.N_CH(N_CH)) u_chsel (
    .sel(ch_sel[SEL_W-1:0]), .cal_we, .rd_req, .clr, .rd_valid, .rd_data, .clr_busy,
    .ch_cal_we, .ch_rd_req, .ch_clr, .ch_rd_valid, .ch_rd_data, .ch_clr_busy);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    tdc_channel #(.N_CARRY4(N_CARRY4), .SEED(c + 1)) u_ch (
      .clk, .rst_n, .ext_hit(ext_hit[c]), .cd_clk, .cd_mode,
      .cal_we(ch_cal_we[c]), .cal_addr, .cal_data,
      .rd_req(ch_rd_req[c]), .rd_addr, .rd_valid(ch_rd_valid[c]),
      .rd_data(ch_rd_data[c]), .clr(ch_clr[c]), .clr_busy(ch_clr_busy[c]),
      .stamp_valid(stamp_valid[c]), .stamp(stamp[c]));
  end
endmodule
