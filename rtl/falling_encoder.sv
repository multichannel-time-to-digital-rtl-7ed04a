// falling_encoder: thermometer-to-binary encoder for the falling transition
// of one sub-TDL.
//
// The falling code is the number of taps the trailing 1-0 transition of the
// wave union has passed: the count of zeros below the lowest one of the
// sampled sub-TDL, 0 when no tap is set. Registered, one clock after the
// input. The paper names the block; the priority-encoder form is this
// design's choice.
module falling_encoder #(
  parameter int N      = tdc_pkg::N_CARRY4_DEF,
  parameter int CODE_W = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic [N-1:0]      therm,
  output logic [CODE_W-1:0] code_q
);
  timeunit 1ps; timeprecision 1fs;
  logic [CODE_W-1:0] code;
  always_comb begin
    code = '0;
    for (int j = N - 1; j >= 0; j--)
      if (therm[j]) code = CODE_W'(j);
  end
  always_ff @(posedge clk) code_q <= code;
endmodule
