// Calibration path of the prototype: chooses what drives the sensor's ep
// and clk inputs.
//
//   cal = 0: ep = line_out (the monitored path), clk = clk_ref
//   cal = 1: ep = clk_ref after CAL_BUFS buffers,  clk = clk_shift
// clk_shift is the reference clock phase-shifted by a clock manager.  With
// cal = 1 and the sensor in mode 0 (ep starts, clk stops) the sensor sees
// Δt = phase - CAL_BUFS * BUF_PS; sweeping the phase step by step and
// noting where each stage first captures 1 yields every buffer delay tau_i.
// The two multiplexers (MUX0 for ep, MUX1 for clk) and the two-buffer path
// follow the original design; the buffer delay is this design's assumption.
module cal_path #(
  parameter int unsigned CAL_BUFS = 2,    // buffers on the calibration ep path
  parameter int unsigned BUF_PS   = 600   // delay of one buffer, ps
) (
  input  logic clk_ref,    // reference clock
  input  logic clk_shift,  // phase-shifted reference clock
  input  logic line_out,   // output of the monitored path
  input  logic cal,        // 1: calibration
  output logic ep,         // to the sensor's ep
  output logic clk         // to the sensor's clk
);
  timeunit 1ps; timeprecision 1ps;

  logic [CAL_BUFS:0] chain;

  assign chain[0] = clk_ref;
  for (genvar b = 0; b < CAL_BUFS; b++) begin : g_buf
    delay_buf #(.DELAY_PS(BUF_PS)) u_buf (.a(chain[b]), .y(chain[b+1]));
  end

  assign ep  = cal ? chain[CAL_BUFS] : line_out;  // MUX0
  assign clk = cal ? clk_shift       : clk_ref;   // MUX1

endmodule
