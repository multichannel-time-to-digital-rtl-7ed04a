// tdl_carry4: tuned tapped delay line of cascaded CARRY4 cells with its
// sampling flip-flops (behavioural model).
//
// Behavioural model, not synthesizable logic: the delay line is an analog
// timing structure of the FPGA, modelled here with real-valued delays. The
// line has N_CARRY4 CARRY4 cells of four delay elements each. Every element
// has two outputs, the carry C and the sum S; the tuned line samples one
// output per element in the pattern S,C,S,C (element 0 first), which gave the
// best linearity. A 0-1 transition entering chain_in at time t0 reaches tap e
// at t0 + rise_ps[e], a 1-0 transition at t0 + fall_ps[e]. At every rising
// edge of clk each tap's flip-flop stores the level the line holds there,
// seen through a small per-tap clock skew, so taps_q is valid one clock after
// the sampled edge. Tap e is bit e of taps_q (element 4*c + i of cell c).
//
// The structure (50 CARRY4s, pattern SCSC, DFF sampling) follows the
// published design. The element delays are this model's choice: uniform
// random in MEAN_PS +- SPREAD_PS, the S output earlier than C by half an
// element delay, falling transitions FALL_RATIO slower than rising ones, and a
// clock skew uniform in +- SKEW_PS, all drawn from SEED so every channel gets
// its own nonuniform bins.
module tdl_carry4 #(
  parameter int         N_CARRY4   = tdc_pkg::N_CARRY4_DEF,
  parameter logic [3:0] PATTERN    = tdc_pkg::PATTERN_SCSC,  // 1 = S, 0 = C
  parameter int unsigned SEED      = 1,
  parameter real        MEAN_PS    = 20.0,
  parameter real        SPREAD_PS  = 10.0,
  parameter real        FALL_RATIO = 1.10,
  parameter real        SKEW_PS    = 3.0
) (
  input  logic                  clk,
  input  logic                  chain_in,  // from the wave-union launcher
  output logic [4*N_CARRY4-1:0] taps_q     // sampled taps
);
  timeunit 1ps; timeprecision 1fs;
  localparam int NT = 4 * N_CARRY4;

  real rise_ps [NT];
  real fall_ps [NT];
  real skew_ps [NT];
  real t_rise, t_fall;
  int unsigned lcg;

  function automatic real next_uniform();  // uniform in [0,1)
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return real'(lcg >> 8) / 16777216.0;
  endfunction

  initial begin
    real cum, d;
    lcg = SEED * 32'd2654435761 + 32'd12345;
    cum = 0.0;
    for (int e = 0; e < NT; e++) begin
      d = MEAN_PS + (2.0 * next_uniform() - 1.0) * SPREAD_PS;
      cum += d;
      rise_ps[e] = PATTERN[e % 4] ? cum - 0.5 * d : cum;
      fall_ps[e] = rise_ps[e] * FALL_RATIO;
      skew_ps[e] = (2.0 * next_uniform() - 1.0) * SKEW_PS;
    end
    // Both transitions long gone: the line idles at zero.
    t_rise = -1.0e12;
    t_fall = -1.0e12 + 1.0;
    taps_q = '0;
  end

  always @(posedge chain_in) t_rise = $realtime;
  always @(negedge chain_in) t_fall = $realtime;

  always @(posedge clk) begin
    real ts;
    logic rose, fell;
    for (int e = 0; e < NT; e++) begin
      ts   = $realtime + skew_ps[e];
      rose = (t_rise + rise_ps[e] <= ts);
      fell = (t_fall > t_rise) && (t_fall + fall_ps[e] <= ts);
      taps_q[e] <= rose && !fell;
    end
  end
endmodule
