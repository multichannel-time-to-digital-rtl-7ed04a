// tdc_channel: one wave-union TDC channel with weighted histogram
// calibration.
//
// Signal path: input selector -> wave-union launcher -> tuned CARRY4 delay
// line with its sampling flip-flops -> sub-TDL register and decomposition ->
// rising and falling encoders per sub-TDL -> fine-code adder -> calibration
// BRAM -> L/M/R histogram BRAMs. A coarse counter runs beside it; every
// detected hit also leaves the channel as a time stamp {coarse, fine}.
//
// Timing, counted from the clock edge E0 that samples the wave union: taps
// registered at E0, sub-TDLs at E0+1, encoder codes at E0+2, fine code and
// stamp at E0+3, histogram bins written at E0+6. Consecutive wave unions must
// be at least three sampling periods apart, so the line has emptied before
// the next launch (hit detection needs an all-empty sample in between).
// The chain of blocks follows the published block diagram; the time stamp
// output and the coarse code capture are this design's choice.
module tdc_channel #(
  parameter int          N_CARRY4 = tdc_pkg::N_CARRY4_DEF,
  parameter int unsigned SEED     = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ext_hit,
  input  logic               cd_clk,
  input  logic               cd_mode,
  // calibration factors
  input  logic               cal_we,
  input  tdc_pkg::fine_t     cal_addr,
  input  tdc_pkg::cal_word_t cal_data,
  // histogram read-out and clear
  input  logic               rd_req,
  input  tdc_pkg::fine_t     rd_addr,
  output logic               rd_valid,
  output tdc_pkg::hist_rd_t  rd_data,
  input  logic               clr,
  output logic               clr_busy,
  // time stamps
  output logic               stamp_valid,
  output tdc_pkg::stamp_t    stamp
);
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int CODE_W = $clog2(N_CARRY4 + 1);

  logic hit, wu;
  logic [N_SUB*N_CARRY4-1:0] taps;
  logic [N_CARRY4-1:0]       sub [N_SUB];
  logic [CODE_W-1:0]         rcode [N_SUB];
  logic [CODE_W-1:0]         fcode [N_SUB];
  logic [N_SUB-1:0]          any;
  logic                      fine_valid;
  fine_t                     fine_code;
  logic [COARSE_W-1:0]       coarse;

  input_selector u_sel (.ext_hit, .cd_clk, .cd_mode, .hit);
  wu_launcher    u_wu  (.hit, .wu_out(wu));
  tdl_carry4 #(.N_CARRY4(N_CARRY4), .SEED(SEED)) u_tdl (
    .clk, .chain_in(wu), .taps_q(taps));
  sub_tdl #(.N_CARRY4(N_CARRY4)) u_sub (.clk, .taps, .sub_q(sub));

  for (genvar k = 0; k < N_SUB; k++) begin : g_enc
    rising_encoder  #(.N(N_CARRY4)) u_re (.clk, .therm(sub[k]),
                                          .code_q(rcode[k]), .any_q(any[k]));
    falling_encoder #(.N(N_CARRY4)) u_fe (.clk, .therm(sub[k]), .code_q(fcode[k]));
  end

  fine_code_sum #(.CODE_W(CODE_W)) u_sum (
    .clk, .rst_n, .rise_code(rcode), .fall_code(fcode), .any,
    .fine_valid, .fine_code);

  coarse_counter u_coarse (.clk, .rst_n, .en(1'b1), .count(coarse));

  weighted_histogram u_wh (
    .clk, .rst_n, .fine_valid, .fine_code, .cal_we, .cal_addr, .cal_data,
    .rd_req, .rd_addr, .rd_valid, .rd_data, .clr, .clr_busy, .fwd());

  assign stamp_valid  = fine_valid;
  assign stamp.coarse = coarse;
  assign stamp.fine   = fine_code;
endmodule
