// tdc_pkg: constants and types shared by the wave-union TDC with weighted
// histogram calibration.
//
// The tapped delay line is 50 CARRY4 cells of four delay elements each; one
// output per element is sampled, in the tuned pattern S,C,S,C, giving 200 taps
// that are split into four sub-TDLs of 50 taps. The fine code adds the rising
// and the falling transition code of every sub-TDL, so it ranges 0..400 and is
// 9 bits wide. Calibration factors are three (address, weight) pairs per fine
// code; weights are unsigned fixed point with COE_FRAC fraction bits, so 1.0 is
// 2**COE_FRAC. Histogram bins accumulate weights and therefore count hits in
// units of 2**-COE_FRAC. Channel count, CARRY4 count and tap pattern follow the
// published design; word widths are this design's own choice.
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  parameter int N_CH_DEF      = 16;  // channels
  parameter int N_CARRY4_DEF  = 50;  // CARRY4 cells per TDL
  parameter int N_SUB         = 4;   // sub-TDLs (one per CARRY4 element)
  parameter int FINE_W        = 9;   // fine code / histogram address width
  parameter int HIST_DEPTH    = 1 << FINE_W;
  parameter int COE_FRAC      = 8;   // fraction bits of a width factor
  parameter int COE_W         = COE_FRAC + 1;  // 0.0 .. 1.0 inclusive
  parameter int HIST_W        = 32;  // histogram bin width
  parameter int COARSE_W      = 32;  // coarse counter width

  typedef logic [FINE_W-1:0] fine_t;
  typedef logic [COE_W-1:0]  coe_t;
  typedef logic [HIST_W-1:0] hist_t;

  // One calibration BRAM word: the three address factors and the three width
  // factors of one actual bin. A width factor of zero marks an unused pair.
  typedef struct packed {
    fine_t addr_l;
    fine_t addr_m;
    fine_t addr_r;
    coe_t  coe_l;
    coe_t  coe_m;
    coe_t  coe_r;
  } cal_word_t;

  // Histogram read-out of one bin: the L, M and R bank values.
  typedef struct packed {
    hist_t l;
    hist_t m;
    hist_t r;
  } hist_rd_t;

  // Time stamp of one hit.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    fine_t               fine;
  } stamp_t;

  // Tap pattern of a CARRY4 cell: 1 = S output sampled, 0 = C output sampled.
  // "SCSC" lists element 0 first.
  localparam logic [3:0] PATTERN_SCSC = 4'b0101;
endpackage
