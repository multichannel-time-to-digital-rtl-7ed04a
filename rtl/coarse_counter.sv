// coarse_counter: coarse time base of one TDC channel.
//
// Counts sampling-clock periods; the fine code gives the position of a hit
// within one period and the coarse code gives the period. A synchronous
// counter with an active-low reset to zero and a count enable; it wraps
// modulo 2**WIDTH. Output changes one clock after each enabled edge. The
// paper names the block; width, enable and reset are this design's choice.
module coarse_counter #(
  parameter int WIDTH = tdc_pkg::COARSE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps; timeprecision 1fs;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
endmodule
