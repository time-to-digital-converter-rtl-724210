// Embedded monotonic TDC of the maximum delay sensor.
//
// The start transition runs down a line of N-1 buffers (tdc_delay_line);
// the stop transition clocks all N stages at once.  Stage i captures 1 when
// start had passed i buffers before stop rose, so for buffer delays
// tau_i the code is Q_i = 1 for every i with
//   Δt >= T_SETUP_PS + tau_0 + .. + tau_(i-1),  Δt = t_stop - t_start.
// Each stage is an mds_stage, whose clock is frozen once it holds 1, so the
// code only grows: the TDC keeps the maximum interval since the last reset.
// The measurement range is tau_0 + .. + tau_(N-2) (N-1 buffer delays).
//
// Interface: q[i] is Q_i; q changes only at rising edges of stop and is
// cleared asynchronously by rst_n = 0.
module mds_tdc #(
  parameter int unsigned N = 4,                          // stages
  parameter int unsigned TAU_PS [N-1] = '{default: 10},  // buffer delays, ps
  parameter int unsigned T_SETUP_PS = 0                   // flip-flop setup, ps
) (
  input  logic         start,  // reference transition
  input  logic         stop,   // measured transition
  input  logic         rst_n,  // asynchronous reset, active low
  output logic [N-1:0] q       // thermometer code Q_0..Q_(N-1)
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0] tap;

  tdc_delay_line #(.N(N), .TAU_PS(TAU_PS), .T_SETUP_PS(T_SETUP_PS)) u_line (
    .start(start),
    .tap  (tap)
  );

  for (genvar i = 0; i < N; i++) begin : g_stage
    mds_stage u_stage (.stop(stop), .d(tap[i]), .rst_n(rst_n), .q(q[i]));
  end

endmodule
