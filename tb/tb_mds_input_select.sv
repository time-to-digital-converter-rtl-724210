// Self-checking testbench for mds_input_select: all 32 input combinations
// against the routing table of the two modes and the polarity XOR.
module tb_mds_input_select;
  timeunit 1ps; timeprecision 1ps;

  logic ep, ntrn, clk, clk_dl, mode;
  logic start, stop;
  int checks = 0, failures = 0;

  mds_input_select dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic e_start, e_stop, pol;
      {ep, ntrn, clk, clk_dl, mode} = 5'(v);
      #1;
      pol     = (ep != ntrn);
      e_start = mode ? clk_dl : pol;
      e_stop  = mode ? pol : clk;
      checks++;
      if (start !== e_start || stop !== e_stop) begin
        failures++;
        $display("FAIL ep=%b ntrn=%b clk=%b clk_dl=%b mode=%b: start=%b stop=%b",
                 ep, ntrn, clk, clk_dl, mode, start, stop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
