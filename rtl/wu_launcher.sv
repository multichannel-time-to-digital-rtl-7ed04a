// wu_launcher: wave-union launcher (behavioural model).
//
// Behavioural model, not synthesizable logic: it uses a delay. On the FPGA the
// launcher is one LUT fed by the hit and by a delayed copy of the hit, placed
// next to the first CARRY4 of the delay line. A rising hit edge makes the
// output rise at once and fall again PULSE_PS later, so two transitions, a
// 0-1 and a 1-0, travel down the delay line one behind the other and the
// line measures the same interval twice per sampling period. The output is
// hit AND NOT(delayed hit); a falling hit edge produces nothing. The LUT
// function and the pulse width are this model's choices: the published design
// states only that a LUT launches a rising and a falling transition.
module wu_launcher #(
  parameter real PULSE_PS = 300.0  // spacing of the two transitions, ps
) (
  input  logic hit,     // hit from the input selector
  output logic wu_out   // to the first CARRY4 of the delay line
);
  timeunit 1ps; timeprecision 1fs;
  logic hit_dly;
  initial hit_dly = 1'b0;
  always @(hit) hit_dly <= #(PULSE_PS) hit;
  assign wu_out = hit & ~hit_dly;
endmodule
