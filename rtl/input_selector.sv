// input_selector: chooses what a TDC channel measures.
//
// In the initial (calibration) stage the channel measures the code-density
// test clock, a clock from the processing system that is asynchronous to the
// sampling clock, so that hits fall uniformly over the sampling period. In the
// measurement stage it measures the external input. The selection is a plain
// 2:1 multiplexer controlled by cd_mode (1 = code-density clock). The paper's
// block diagram names the block and its two sources; the control signal and
// its encoding are this design's choice. Purely combinational.
module input_selector (
  input  logic ext_hit,   // external hit input of the channel
  input  logic cd_clk,    // code-density test clock
  input  logic cd_mode,   // 1: code-density test, 0: measurement
  output logic hit        // to the wave-union launcher
);
  timeunit 1ps; timeprecision 1fs;
  always_comb hit = cd_mode ? cd_clk : ext_hit;
endmodule
