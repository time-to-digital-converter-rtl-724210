// Upper delay line of an N-stage monotonic TDC.
//
// The start transition runs through N-1 buffers with delays
// TAU_PS[0..N-2]; tap[i] is the start signal after i buffers and feeds the
// D input of flip-flop FF_i, so tap[0] is start itself.  When stop rises
// Δt after start, FF_i sees a 1 exactly when Δt is at least
// TAU_PS[0]+..+TAU_PS[i-1], which makes the captured word a thermometer code.
//
// T_SETUP_PS models the setup time of the flip-flops behind the taps: every
// tap is shifted by it, so an ideal flip-flop sampling tap[i] reads 1 only
// if start reached its D input at least T_SETUP_PS before the clock edge.
// This is this design's modelling choice; the original design lists only the
// buffers.  Behavioural model (built from delay_buf), not synthesizable.
module tdc_delay_line #(
  parameter int unsigned N = 4,                            // stages (taps)
  parameter int unsigned TAU_PS [N-1] = '{default: 10},    // buffer delays
  parameter int unsigned T_SETUP_PS = 0                     // flip-flop setup
) (
  input  logic         start,  // start transition
  output logic [N-1:0] tap     // tap[i]: start after i buffers (+ setup)
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0] node;  // node[i]: start after i buffers

  assign node[0] = start;

  for (genvar i = 0; i < N - 1; i++) begin : g_buf
    delay_buf #(.DELAY_PS(TAU_PS[i])) u_tau (.a(node[i]), .y(node[i+1]));
  end

  for (genvar i = 0; i < N; i++) begin : g_tap
    if (T_SETUP_PS == 0) begin : g_direct
      assign tap[i] = node[i];
    end else begin : g_setup
      delay_buf #(.DELAY_PS(T_SETUP_PS)) u_setup (.a(node[i]), .y(tap[i]));
    end
  end

endmodule
