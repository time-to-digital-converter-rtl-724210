// Self-checking testbench for cal_path: with cal = 0 the sensor inputs
// follow the monitored line and the reference clock; with cal = 1 ep is
// the reference clock two buffers (1200 ps) late and clk is the shifted
// clock.  Each source is driven with its own pattern so a wrong choice
// shows.
module tb_cal_path;
  timeunit 1ps; timeprecision 1ps;

  logic clk_ref = 1'b0, clk_shift = 1'b0, line_out = 1'b0, cal = 1'b0;
  logic ep, clk;
  int checks = 0, failures = 0;

  cal_path dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect2(input logic e_ep, input logic e_clk, input string what);
    checks++;
    if (ep !== e_ep || clk !== e_clk) begin
      failures++;
      $display("FAIL t=%0t %s: ep=%b clk=%b expected %b %b", $time, what, ep, clk, e_ep, e_clk);
    end
  endtask

  initial begin
    #5000;
    // cal = 0: direct paths
    repeat (20) begin
      line_out  = 1'($urandom_range(0, 1));
      clk_ref   = 1'($urandom_range(0, 1));
      clk_shift = 1'($urandom_range(0, 1));
      #1 expect2(line_out, clk_ref, "cal=0");
      #5000;
    end
    // cal = 1: ep is clk_ref 1200 ps late, clk is clk_shift
    cal = 1'b1; clk_ref = 1'b0; #5000;
    repeat (10) begin
      clk_ref = !clk_ref;
      line_out = 1'($urandom_range(0, 1));
      clk_shift = 1'($urandom_range(0, 1));
      #1199 expect2(!clk_ref, clk_shift, "cal=1 before 1200 ps");
      #2    expect2(clk_ref, clk_shift, "cal=1 after 1200 ps");
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
