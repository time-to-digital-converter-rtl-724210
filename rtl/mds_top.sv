// Four-stage maximum delay sensor prototype with timing-error warning.
//
// The monitored path is a reconfigurable delay line driven by the reference
// clock, so its end point toggles every cycle with a delay of s buffers.
// The calibration path selects what reaches the sensor: the delay line and
// the reference clock (cal = 0), or the clock through two buffers and a
// phase-shifted copy of the clock (cal = 1).  The sensor (mds) keeps the
// largest arrival time of ep after the delayed clock as a thermometer code,
// and mds_warning samples it on the reference clock and raises warn once
// the maximum exceeds threshold.
//
// Operation: hold rst_n = 0 with sel = 0 for at least one clock, then
//   - measurement: cal = 0, sel = 1, choose s; q keeps the longest delay,
//   - calibration: cal = 1, sel = 0, step the phase of clk_shift upward;
//     the phase at which Q_i first becomes 1 gives tau_0..tau_(N-2).
// sample pulses (one clk_ref cycle) update max_count and warn.
//
// Follows the original FPGA prototype: 100 MHz clock, a six-bit
// reconfigurable delay line, buffer delays tau_i of 0.55, 0.77 and 0.07 ns,
// two calibration buffers and ntrn brought out.  The clock manager is
// outside (clk_shift is an input).  The delay of one line buffer, the DL
// delay (chosen so that settings near 45 buffers fall inside the sensor's
// range) and a zero setup time are this design's assumptions.
module mds_top
  import mds_pkg::*;
#(
  parameter int unsigned N          = MDS_STAGES,          // sensor stages
  parameter int unsigned TAU_PS [N-1] = '{550, 770, 70},   // tau_i, ps
  parameter int unsigned T_DL_PS    = 6100,                // DL delay, ps
  parameter int unsigned T_RES_PS   = 100,                 // DL step, ps
  parameter int unsigned T_SETUP_PS = 0,                   // flip-flop setup, ps
  parameter int unsigned SECTIONS   = 6,                   // delay-line bits
  parameter int unsigned BUF_PS     = 600,                 // line buffer, ps
  parameter int unsigned CAL_BUFS   = 2,                   // calibration buffers
  parameter int unsigned CW         = $clog2(N + 1)        // count width
) (
  input  logic                clk_ref,    // 100 MHz reference clock
  input  logic                clk_shift,  // phase-shifted reference clock
  input  logic                cal,        // 1: calibration path
  input  logic [SECTIONS-1:0] s,          // delay-line setting S5..S0
  input  logic                sel,        // sensor mode: 0 init, 1 measure
  input  logic                ntrn,       // 1: measure falling ep edges
  input  logic                rst_n,      // reset, active low
  input  logic                sample,     // sample the code this cycle
  input  logic [CW-1:0]       threshold,  // warning threshold, in stages
  output logic [N-1:0]        q,          // thermometer code Q_0..Q_(N-1)
  output logic [CW-1:0]       max_count,  // sampled maximum, in stages
  output logic                warn        // maximum above threshold
);
  timeunit 1ps; timeprecision 1ps;

  logic line_out, ep, clk;

  reconfig_delay_line #(.SECTIONS(SECTIONS), .BUF_PS(BUF_PS)) u_line (
    .a(clk_ref),
    .s(s),
    .y(line_out)
  );

  cal_path #(.CAL_BUFS(CAL_BUFS), .BUF_PS(BUF_PS)) u_cal (
    .clk_ref  (clk_ref),
    .clk_shift(clk_shift),
    .line_out (line_out),
    .cal      (cal),
    .ep       (ep),
    .clk      (clk)
  );

  mds #(.N(N), .TAU_PS(TAU_PS), .T_DL_PS(T_DL_PS), .T_RES_PS(T_RES_PS), .T_SETUP_PS(T_SETUP_PS)) u_mds (
    .ep   (ep),
    .clk  (clk),
    .mode (sel),
    .ntrn (ntrn),
    .rst_n(rst_n),
    .q    (q)
  );

  mds_warning #(.N(N), .CW(CW)) u_warn (
    .clk      (clk_ref),
    .rst_n    (rst_n),
    .q        (q),
    .sample   (sample),
    .threshold(threshold),
    .max_count(max_count),
    .warn     (warn)
  );

endmodule
