// rising_encoder: thermometer-to-binary encoder for the rising transition of
// one sub-TDL.
//
// After a wave-union launch a sampled sub-TDL reads, from tap 0 upward,
// zeros (taps already passed by the trailing 1-0 transition), ones, then
// zeros (taps the leading 0-1 transition has not reached). The rising code is
// the number of taps the 0-1 transition has passed: the index of the highest
// one plus one, 0 when no tap is set. `any` flags a non-empty pattern. Both
// outputs are registered, one clock after the input. The paper names the
// block (TM2BIN); the priority-encoder form is this design's choice.
module rising_encoder #(
  parameter int N      = tdc_pkg::N_CARRY4_DEF,
  parameter int CODE_W = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic [N-1:0]      therm,
  output logic [CODE_W-1:0] code_q,
  output logic              any_q
);
  timeunit 1ps; timeprecision 1fs;
  logic [CODE_W-1:0] code;
  always_comb begin
    code = '0;
    for (int j = 0; j < N; j++)
      if (therm[j]) code = CODE_W'(j + 1);
  end
  always_ff @(posedge clk) begin
    code_q <= code;
    any_q  <= |therm;
  end
endmodule
