// Self-checking testbench for dl_delay: a 5 ns-high, 10 ns clock through a
// 6.1 ns DL built from 100 ps steps must come out with both edges exactly
// 6.1 ns late, although each clock pulse is shorter than the whole delay.
module tb_dl_delay;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TDL = 6100;
  localparam int unsigned RES = 100;

  logic clk = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  dl_delay #(.T_DL_PS(TDL), .T_RES_PS(RES)) dut (.a(clk), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5000 clk = !clk;

  // Compare y with the clock as it was TDL ago, 1 ps either side of each
  // delayed edge.
  initial begin
    #20000;
    repeat (20) begin
      @(posedge clk); #(TDL - 1);
      checks++; if (y !== 1'b0) begin failures++; $display("FAIL rise early at %0t", $time); end
      #2;
      checks++; if (y !== 1'b1) begin failures++; $display("FAIL rise late at %0t", $time); end
    end
    repeat (20) begin
      @(negedge clk); #(TDL - 1);
      checks++; if (y !== 1'b1) begin failures++; $display("FAIL fall early at %0t", $time); end
      #2;
      checks++; if (y !== 1'b0) begin failures++; $display("FAIL fall late at %0t", $time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
