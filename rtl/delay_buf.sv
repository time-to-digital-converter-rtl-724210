// Behavioural model of a delay element: a non-inverting buffer with a fixed
// propagation delay.
//
// It stands for every buffer of the sensor and its test circuit: the TDC
// buffers tau_i, the steps of the clock delay element DL and the buffers of
// the prototype's delay lines.  In silicon these are standard-cell or FPGA
// buffers whose delay is a physical property, so this model is not
// synthesizable logic (synthesis ignores the delay).  The delay is
// inertial, like a real gate's: an edge reaches y DELAY_PS picoseconds
// after it reaches a, and a pulse shorter than DELAY_PS is swallowed.
// Longer delays are therefore built as chains of short elements.
module delay_buf #(
  parameter int unsigned DELAY_PS = 10  // propagation delay in ps
) (
  input  logic a,  // buffer input
  output logic y   // a delayed by DELAY_PS
);
  timeunit 1ps; timeprecision 1ps;

  assign #(DELAY_PS) y = a;

endmodule
