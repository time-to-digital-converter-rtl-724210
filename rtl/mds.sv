// Maximum delay sensor (MDS): keeps, as a thermometer code, the largest
// arrival time of a logic end point measured against a delayed clock.
//
// ep is tied to the end point of the monitored paths and clk to the clock
// that launches them.  In measurement mode (mode = 1) the clock, delayed by
// the element DL, starts the embedded monotonic TDC and the polarity-
// corrected ep transition stops it, so each cycle in which a path toggles
// ep measures Δt = t_ep - (t_clk + T_DL_PS).  A stage that holds 1 cannot be
// clocked again, so the code only grows: it holds the maximum Δt seen since
// rst_n was last low.  DL shifts the window so that a few stages cover the
// interesting range: delays from T_DL_PS + T_SETUP_PS up to
// T_DL_PS + T_SETUP_PS + sum(TAU_PS) are resolved.
//
// Initialise with mode = 0 and rst_n = 0, then raise both.  In mode 0 the
// inputs are swapped (ep starts, clk stops), which the prototype uses for
// calibration.  q[i] is Q_i; it changes only at rising edges of the TDC stop
// input.
//
// Defaults: four stages and a 30 ps DL as in the original sensor's circuit
// simulation; 10 ps buffers (it quotes a resolution of the order of 10 ps);
// a 5 ps flip-flop setup time, this design's choice, with which 10, 20 and
// 40 ps intervals give 1000, 1100 and 1111 as reported for the original sensor.  DL is
// built from T_RES_PS steps (the resolution of the DLL that sets it); the
// 10 ps step is also this design's choice.
module mds #(
  parameter int unsigned N = mds_pkg::MDS_STAGES,        // TDC stages
  parameter int unsigned TAU_PS [N-1] = '{default: 10},  // buffer delays, ps
  parameter int unsigned T_DL_PS = 30,                    // DL delay, ps
  parameter int unsigned T_RES_PS = 10,                   // DL step, ps
  parameter int unsigned T_SETUP_PS = 5                   // flip-flop setup, ps
) (
  input  logic         ep,     // monitored end point
  input  logic         clk,    // clock launching the monitored paths
  input  logic         mode,   // 0: initialise, 1: measure
  input  logic         ntrn,   // 0: rising, 1: falling transitions of ep
  input  logic         rst_n,  // asynchronous reset of the code, active low
  output logic [N-1:0] q       // thermometer code Q_0..Q_(N-1)
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_dl, start, stop;

  dl_delay #(.T_DL_PS(T_DL_PS), .T_RES_PS(T_RES_PS)) u_dl (.a(clk), .y(clk_dl));

  mds_input_select u_sel (
    .ep    (ep),
    .ntrn  (ntrn),
    .clk   (clk),
    .clk_dl(clk_dl),
    .mode  (mode),
    .start (start),
    .stop  (stop)
  );

  mds_tdc #(.N(N), .TAU_PS(TAU_PS), .T_SETUP_PS(T_SETUP_PS)) u_tdc (
    .start(start),
    .stop (stop),
    .rst_n(rst_n),
    .q    (q)
  );

endmodule
