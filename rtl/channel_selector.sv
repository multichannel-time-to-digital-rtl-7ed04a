// channel_selector: connects the processor to one TDC channel at a time.
//
// The register interface presents one set of calibration-write, histogram
// read-out and clear signals; `sel` picks the channel they go to, and the
// selected channel's read-out data and status come back. Strobes (cal_we,
// rd_req, clr) reach only the selected channel; address and data are shared
// by all. Purely combinational. The paper gives the block's purpose; the
// signal set is this design's.
module channel_selector #(
  parameter int N_CH  = tdc_pkg::N_CH_DEF,
  parameter int SEL_W = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic [SEL_W-1:0]   sel,
  // processor side
  input  logic               cal_we,
  input  logic               rd_req,
  input  logic               clr,
  output logic               rd_valid,
  output tdc_pkg::hist_rd_t  rd_data,
  output logic               clr_busy,
  // channel side
  output logic [N_CH-1:0]    ch_cal_we,
  output logic [N_CH-1:0]    ch_rd_req,
  output logic [N_CH-1:0]    ch_clr,
  input  logic [N_CH-1:0]    ch_rd_valid,
  input  tdc_pkg::hist_rd_t  ch_rd_data [N_CH],
  input  logic [N_CH-1:0]    ch_clr_busy
);
  timeunit 1ps; timeprecision 1fs;
  always_comb begin
    ch_cal_we = '0;
    ch_rd_req = '0;
    ch_clr    = '0;
    rd_valid  = 1'b0;
    rd_data   = '0;
    clr_busy  = 1'b0;
    for (int c = 0; c < N_CH; c++)
      if (SEL_W'(c) == sel) begin
        ch_cal_we[c] = cal_we;
        ch_rd_req[c] = rd_req;
        ch_clr[c]    = clr;
        rd_valid     = ch_rd_valid[c];
        rd_data      = ch_rd_data[c];
        clr_busy     = ch_clr_busy[c];
      end
  end
endmodule
