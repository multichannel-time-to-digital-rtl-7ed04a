// sub_tdl: second sampling stage and sub-TDL decomposition.
//
// The taps of the tuned delay line are registered once more and split into
// N_SUB sub-TDLs: sub-TDL k takes element k of every CARRY4 cell (S0, C1, S2,
// C3 for the SCSC pattern). Neighbouring taps of one sub-TDL are a whole
// CARRY4 apart, four times the spacing of the full line, so clock skew and
// mismatch can no longer reorder them and bubbles disappear, while the four
// sub-TDLs together keep the resolution of the full line. sub_q[k][j] is tap
// 4*j + k; it is valid one clock after taps. The decomposition follows the
// published design; the extra register stage is this design's choice.
module sub_tdl #(
  parameter int N_CARRY4 = tdc_pkg::N_CARRY4_DEF,
  parameter int N_SUB    = tdc_pkg::N_SUB
) (
  input  logic                      clk,
  input  logic [N_SUB*N_CARRY4-1:0] taps,
  output logic [N_CARRY4-1:0]       sub_q [N_SUB]
);
  timeunit 1ps; timeprecision 1fs;
  always_ff @(posedge clk)
    for (int k = 0; k < N_SUB; k++)
      for (int j = 0; j < N_CARRY4; j++)
        sub_q[k][j] <= taps[N_SUB*j + k];
endmodule
