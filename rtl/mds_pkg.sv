// Shared definitions of the maximum delay sensor (MDS).
//
// The MDS is a monotonic time-to-digital converter whose stages can only move
// from 0 to 1, so its thermometer code holds the largest time interval seen
// since the last reset.  This package carries the two operating modes of the
// sensor, the default stage count and a helper that turns a thermometer code
// Q0Q1..Q(N-1) into the number of ones, i.e. the measured interval in units
// of one buffer delay.  Bit i of every code vector in this design is Q_i.
package mds_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Number of TDC stages of the sensor built and evaluated in the original design.
  localparam int unsigned MDS_STAGES = 4;

  // Value of the mode input.  Initialisation routes ep to start and clk to
  // stop; measurement routes the delayed clock to start and ep to stop.
  typedef enum logic {
    MODE_INIT    = 1'b0,
    MODE_MEASURE = 1'b1
  } mds_mode_e;

  localparam int unsigned CODE_MAX_W = 32;

  // Number of ones in a thermometer code (widths up to CODE_MAX_W).
  function automatic int unsigned therm_ones(input logic [CODE_MAX_W-1:0] code);
    int unsigned n = 0;
    for (int i = 0; i < CODE_MAX_W; i++) n += int'(code[i]);
    return n;
  endfunction

endpackage
