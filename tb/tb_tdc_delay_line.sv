// Self-checking testbench for tdc_delay_line: with unequal buffer delays
// and a setup shift, each tap must rise and fall exactly
// T_SETUP + tau_0 + .. + tau_(i-1) after start, one picosecond earlier it
// must still hold the old value.
module tb_tdc_delay_line;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 4;
  localparam int unsigned TAU [N-1] = '{30, 50, 70};
  localparam int unsigned TSU = 5;

  logic start = 1'b0;
  logic [N-1:0] tap;
  int checks = 0, failures = 0;

  tdc_delay_line #(.N(N), .TAU_PS(TAU), .T_SETUP_PS(TSU)) dut (.start(start), .tap(tap));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected arrival time of tap i after an edge on start.
  function automatic int unsigned arrival(int i);
    int unsigned t = TSU;
    for (int j = 0; j < i; j++) t += TAU[j];
    return t;
  endfunction

  task automatic edge_check(input logic v);
    int t0;
    t0 = int'($time);
    start = v;
    fork
      for (int i = 0; i < int'(N); i++) begin
        automatic int ii = i;
        fork
          begin
            #(arrival(ii) - 1);
            checks++;
            if (tap[ii] !== !v) begin failures++; $display("FAIL tap%0d early", ii); end
            #2;
            checks++;
            if (tap[ii] !== v) begin failures++; $display("FAIL tap%0d late", ii); end
          end
        join_none
      end
    join_none
    #500;
    if (int'($time) - t0 < 500) failures++;
  endtask

  initial begin
    #200;
    checks++;
    if (tap !== '0) begin failures++; $display("FAIL taps not 0 at start"); end
    repeat (3) begin
      edge_check(1'b1);
      edge_check(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
