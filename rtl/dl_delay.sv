// Behavioural model of the clock delay element DL of the maximum delay
// sensor.
//
// DL delays the clock before it starts the sensor's TDC, so that the
// TDC's few stages cover the window in which the monitored end point
// arrives.  Its delay is set by a delay-locked loop in steps of the loop's
// resolution t_res, so T_DL_PS is taken to be a multiple of T_RES_PS and
// the element is a chain of T_DL_PS / T_RES_PS steps of T_RES_PS each.
// Building it from short steps also lets clock pulses shorter than the
// whole delay pass, as they do through a delay line.  The loop that tunes
// it is outside this model: the delay is a parameter.  Not synthesizable.
module dl_delay #(
  parameter int unsigned T_DL_PS  = 30,  // total delay, ps
  parameter int unsigned T_RES_PS = 10   // delay step (DLL resolution), ps
) (
  input  logic a,  // clock in
  output logic y   // clock delayed by T_DL_PS
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned STEPS = (T_DL_PS + T_RES_PS - 1) / T_RES_PS;

  if (STEPS == 0) begin : g_none
    assign y = a;
  end else begin : g_chain
    logic [STEPS:0] node;
    assign node[0] = a;
    for (genvar i = 0; i < STEPS; i++) begin : g_step
      delay_buf #(.DELAY_PS(T_RES_PS)) u_step (.a(node[i]), .y(node[i+1]));
    end
    assign y = node[STEPS];
  end

endmodule
