// One stage of the maximum delay sensor: a D flip-flop that can only be
// clocked while it holds 0.
//
// The flip-flop is clocked by (stop OR q).  While q is 0 every rising edge
// of stop captures d, the delayed start signal of this stage.  Once it has
// captured a 1, the OR gate holds its clock at a static 1, no further edge
// can reach it, and the 1 is kept until rst_n is pulled low.  A chain of
// these stages therefore keeps the largest thermometer code ever captured.
// This is the structure of the original gate-level sensor; the active-low
// asynchronous reset follows its prototype, where rst is a negative reset.
//
// Interface: d is sampled on the rising edge of stop; q is updated at that
// edge; rst_n clears q asynchronously.  The clock derived from q is the
// intended function of the stage (a self-disabling clock), not an error.
// An assertion checks the monotonic property: q falls only under reset.
module mds_stage (
  input  logic stop,   // measurement edge (clock when q = 0)
  input  logic d,      // start signal delayed to this stage
  input  logic rst_n,  // asynchronous reset, active low
  output logic q       // captured bit Q_i
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_g;  // gated clock: static 1 once q = 1

  assign clk_g = stop | q;

  always_ff @(posedge clk_g or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  // The code is monotonic: a stage may only fall while reset is applied.
  always @(negedge q) begin
    assert (!rst_n) else $error("mds_stage: q fell without reset");
  end

endmodule
