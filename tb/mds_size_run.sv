// Testbench helper: drives one maximum delay sensor with its own clock and
// random end-point delays, and checks the held code after every edge.
//
// Each cycle the end point rises T_DL_PS + dt after the clock edge, with dt
// drawn from 0..dt_max (every eighth cycle dt = dt_max exactly), and falls
// again before the next edge.  The expected code is the thermometer code of
// the largest dt since reset: stage i holds 1 once some dt >= T_SETUP_PS +
// 10 i (10 ps buffers).  Values of dt on a stage boundary are moved 1 ps up.
// rst_n low resets both the sensor and the reference.  checks and failures
// accumulate for the enclosing testbench.
module mds_size_run #(
  parameter int N          = 8,
  parameter int T_DL_PS    = 30,
  parameter int PERIOD_PS  = 10000,
  parameter int T_SETUP_PS = 5
) (
  input  int           dt_max,    // largest end-point delay beyond DL, ps
  input  logic         rst_n,     // sensor reset, active low
  output logic [N-1:0] q,         // sensor code
  output int           checks,
  output int           failures
);
  timeunit 1ps; timeprecision 1ps;

  localparam int TAU = 10;
  typedef int unsigned tau_t [N-1];
  localparam tau_t TAUS = '{default: TAU};

  logic clk = 1'b0, ep = 1'b0;
  int best = -1;
  int cycle = 0;

  mds #(.N(N), .TAU_PS(TAUS), .T_DL_PS(T_DL_PS), .T_RES_PS(10),
        .T_SETUP_PS(T_SETUP_PS)) dut (
    .ep(ep), .clk(clk), .mode(1'b1), .ntrn(1'b0), .rst_n(rst_n), .q(q));

  function automatic logic [N-1:0] code_for(int dt);
    logic [N-1:0] c = '0;
    for (int i = 0; i < N; i++) c[i] = (dt >= T_SETUP_PS + TAU * i);
    return c;
  endfunction

  initial begin checks = 0; failures = 0; end

  always #(PERIOD_PS / 2) clk = !clk;

  always @(negedge rst_n) best = -1;

  always @(posedge clk) begin
    automatic int dt = (cycle % 8 == 0) ? dt_max : int'($urandom_range(0, dt_max));
    cycle++;
    if ((dt - T_SETUP_PS) % TAU == 0) dt++;
    if (rst_n) begin
      #(T_DL_PS + dt) ep = 1'b1;
      if (dt > best) best = dt;
      #1;
      checks++;
      if (q !== code_for(best)) begin
        failures++;
        $display("FAIL N=%0d t=%0t dt=%0d: code %b expected %b", N, $time, dt, q, code_for(best));
      end
      #(PERIOD_PS / 4) ep = 1'b0;
    end
  end

endmodule
