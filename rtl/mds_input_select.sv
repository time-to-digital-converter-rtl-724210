// Input selection of the maximum delay sensor.
//
// ep first passes an XOR with ntrn, which sets which transition of the end
// point is measured: ntrn = 0 for rising (positive) paths, 1 for falling
// (negative) paths, so the TDC always sees a rising edge.  Two 2:1
// multiplexers, S0 and S1, both driven by mode, then swap the two inputs:
//   mode = 0 (initialise): start = ep XOR ntrn, stop = clk
//   mode = 1 (measure)   : start = clk_dl,      stop = ep XOR ntrn
// clk_dl is the clock after the delay element DL, clk the clock without it,
// as the original gate-level design wires them.  Purely combinational.
module mds_input_select
  import mds_pkg::*;
(
  input  logic ep,      // monitored end point
  input  logic ntrn,    // 1: measure falling transitions of ep
  input  logic clk,     // clock, undelayed
  input  logic clk_dl,  // clock after DL
  input  logic mode,    // 0: initialise, 1: measure
  output logic start,   // TDC start
  output logic stop     // TDC stop
);
  timeunit 1ps; timeprecision 1ps;

  logic      ep_pol;
  mds_mode_e mode_e;

  assign ep_pol = ep ^ ntrn;
  assign mode_e = mds_mode_e'(mode);

  always_comb begin
    if (mode_e == MODE_MEASURE) begin
      start = clk_dl;  // S0 input 1
      stop  = ep_pol;  // S1 input 1
    end else begin
      start = ep_pol;  // S0 input 0
      stop  = clk;     // S1 input 0
    end
  end

endmodule
