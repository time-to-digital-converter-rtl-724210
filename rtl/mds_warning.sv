// Timing-error warning from the maximum delay sensor's code.
//
// The sensor's thermometer code changes whenever a longer path delay is
// seen, at edges unrelated to the system clock, so it is first passed
// through a two-flop synchroniser.  On each sample pulse the number of ones
// in the code (the maximum delay in buffer-delay units) is registered in
// max_count, and warn is set when that count is greater than threshold,
// cleared otherwise.  Because the sensor only keeps maxima, warn stays set
// until the sensor is reset.  A code caught while changing can only read
// low by the stages still in flight; the next sample reads it correctly.
//
// The original design gives only the function (warn when the captured maximum
// delay exceeds a predefined threshold, checked at sampling times); the
// synchroniser, sample strobe and count encoding are this design's choices.
//
// Timing: max_count and warn update one clock after a sample pulse that
// arrives at least two clocks after the code settled.
module mds_warning
  import mds_pkg::*;
#(
  parameter int unsigned N  = MDS_STAGES,     // sensor stages
  parameter int unsigned CW = $clog2(N + 1)   // count width
) (
  input  logic          clk,        // system clock
  input  logic          rst_n,      // asynchronous reset, active low
  input  logic [N-1:0]  q,          // sensor thermometer code (asynchronous)
  input  logic          sample,     // take a sample this cycle
  input  logic [CW-1:0] threshold,  // warn when count > threshold
  output logic [CW-1:0] max_count,  // last sampled maximum delay, in stages
  output logic          warn        // maximum delay above threshold
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0]  q_meta, q_sync;
  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_meta <= '0;
      q_sync <= '0;
    end else begin
      q_meta <= q;
      q_sync <= q_meta;
    end
  end

  assign count = CW'(therm_ones(CODE_MAX_W'(q_sync)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_count <= '0;
      warn      <= 1'b0;
    end else if (sample) begin
      max_count <= count;
      warn      <= count > threshold;
    end
  end

endmodule
