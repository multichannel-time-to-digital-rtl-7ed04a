// calibration_bram: per-channel table of weighted-histogram calibration
// factors.
//
// One word per fine code (actual bin k) holds three address factors
// Addr L/M/R[k], the ideal bins that actual bin k overlaps, and three width
// factors Coe L/M/R[k], the fraction of bin k that falls into each of them.
// The processor writes the table through the write port (cal address and
// cal parameters); the TDC reads it with the fine code as address.
// Simple dual-port RAM: one synchronous write port, one synchronous read port
// with one clock of latency. Contents are not reset, as in a block RAM; the
// processor loads the table before use. The organisation follows the
// published design; the word layout (tdc_pkg::cal_word_t) is this design's.
module calibration_bram #(
  parameter int DEPTH = tdc_pkg::HIST_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  // processor side
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  tdc_pkg::cal_word_t  wr_data,
  // TDC side
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output tdc_pkg::cal_word_t  rd_data
);
  timeunit 1ps; timeprecision 1fs;
  tdc_pkg::cal_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
