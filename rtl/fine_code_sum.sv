// fine_code_sum: wave-union fine code and hit detection.
//
// Adds the rising and the falling codes of all N_SUB sub-TDLs. Every tap
// crossed by either transition raises the sum by one, so the sum is a
// thermometer count of all crossings and has up to 2*N_SUB*N codes per line,
// as many as the rising and the falling line together (the wave-union
// resolution T/(Nr+Nf)). A hit is reported in the first clock in which any
// sub-TDL is non-empty after a clock in which all were empty; later samples
// of the same wave union, still travelling in the line, are ignored. Inputs
// are the registered encoder outputs; fine_valid and fine_code are registered,
// one clock later. The summation follows the published design; the hit
// detection rule is this design's choice.
module fine_code_sum #(
  parameter int N_SUB  = tdc_pkg::N_SUB,
  parameter int CODE_W = 6,
  parameter int FINE_W = tdc_pkg::FINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] rise_code [N_SUB],
  input  logic [CODE_W-1:0] fall_code [N_SUB],
  input  logic [N_SUB-1:0]  any,
  output logic              fine_valid,
  output logic [FINE_W-1:0] fine_code
);
  timeunit 1ps; timeprecision 1fs;
  logic [FINE_W-1:0] sum;
  logic              any_prev;

  always_comb begin
    sum = '0;
    for (int k = 0; k < N_SUB; k++)
      sum += FINE_W'(rise_code[k]) + FINE_W'(fall_code[k]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      any_prev   <= 1'b1;  // no hit reported out of reset
      fine_valid <= 1'b0;
      fine_code  <= '0;
    end else begin
      any_prev   <= |any;
      fine_valid <= (|any) && !any_prev;
      fine_code  <= sum;
    end
endmodule
