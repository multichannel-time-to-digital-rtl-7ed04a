// weighted_histogram: weighted histogram calibration of one TDC channel.
//
// Every fine code (actual bin k) is mapped onto up to three ideal bins. The
// fine code addresses the calibration BRAM, which returns the address factors
// Addr L/M/R[k] and width factors Coe L/M/R[k]; each of the three histogram
// BRAMs (L, M, R) then adds its width factor to the bin its address factor
// names. A wide actual bin thereby spreads its hits over the ideal bins it
// covers, in proportion to the overlap, and a narrow one contributes only a
// fraction of a count; the calibrated histogram of ideal bin n is
// L[n] + M[n] + R[n]. Address remapping and width correction happen in one
// step, so one code-density test is enough to compute the factors.
//
// Timing: fine_valid/fine_code in clock 0, calibration word read in clock 0
// and registered, histogram bins read in clock 1 and written in clock 2.
// One hit per clock is accepted. All three banks are updated for every hit
// (a width factor of zero adds nothing), so they stay in step and answer a
// read-out request together. Read-out returns the three banks' values of
// one bin. The structure follows the published design; the pipelining and
// the read-out and clear handshakes are this design's choice.
module weighted_histogram #(
  parameter int DEPTH = tdc_pkg::HIST_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // fine code from the encoder
  input  logic               fine_valid,
  input  logic [AW-1:0]      fine_code,
  // calibration factors from the processor
  input  logic               cal_we,
  input  logic [AW-1:0]      cal_addr,
  input  tdc_pkg::cal_word_t cal_data,
  // histogram read-out
  input  logic               rd_req,
  input  logic [AW-1:0]      rd_addr,
  output logic               rd_valid,
  output tdc_pkg::hist_rd_t  rd_data,
  // clear all three banks
  input  logic               clr,
  output logic               clr_busy,
  output logic               fwd        // a bank forwarded a pending write
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  cal_word_t cw;
  logic      hv;
  logic [2:0] bank_rd_valid, bank_clr_busy, bank_fwd;

  calibration_bram #(.DEPTH(DEPTH)) u_cal (
    .clk, .wr_en(cal_we), .wr_addr(cal_addr), .wr_data(cal_data),
    .rd_en(fine_valid), .rd_addr(fine_code), .rd_data(cw));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hv <= 1'b0;
    else        hv <= fine_valid;

  histogram_bram #(.DEPTH(DEPTH)) u_hist_l (
    .clk, .rst_n, .acc_valid(hv), .acc_addr(cw.addr_l), .acc_inc(cw.coe_l),
    .fwd(bank_fwd[0]), .rd_req, .rd_addr, .rd_valid(bank_rd_valid[0]),
    .rd_data(rd_data.l), .clr, .clr_busy(bank_clr_busy[0]));

  histogram_bram #(.DEPTH(DEPTH)) u_hist_m (
    .clk, .rst_n, .acc_valid(hv), .acc_addr(cw.addr_m), .acc_inc(cw.coe_m),
    .fwd(bank_fwd[1]), .rd_req, .rd_addr, .rd_valid(bank_rd_valid[1]),
    .rd_data(rd_data.m), .clr, .clr_busy(bank_clr_busy[1]));

  histogram_bram #(.DEPTH(DEPTH)) u_hist_r (
    .clk, .rst_n, .acc_valid(hv), .acc_addr(cw.addr_r), .acc_inc(cw.coe_r),
    .fwd(bank_fwd[2]), .rd_req, .rd_addr, .rd_valid(bank_rd_valid[2]),
    .rd_data(rd_data.r), .clr, .clr_busy(bank_clr_busy[2]));

  assign rd_valid = bank_rd_valid[0];
  assign clr_busy = bank_clr_busy[0];
  assign fwd      = |bank_fwd;

  a_banks_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    bank_rd_valid == {3{bank_rd_valid[0]}} && bank_clr_busy == {3{bank_clr_busy[0]}});
endmodule
