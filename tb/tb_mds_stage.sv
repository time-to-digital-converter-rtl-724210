// Self-checking testbench for mds_stage: the stage follows d on rising
// edges of stop while it holds 0, freezes once it has captured 1, ignores
// d changes without a stop edge and is cleared at once by rst_n.
module tb_mds_stage;
  timeunit 1ps; timeprecision 1ps;

  logic stop = 1'b0, d = 1'b0, rst_n = 1'b0;
  logic q;
  logic model_q;
  int checks = 0, failures = 0;

  mds_stage dut (.stop(stop), .d(d), .rst_n(rst_n), .q(q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e) begin failures++; $display("FAIL %s: q=%b expected %b", what, q, e); end
  endtask

  task automatic pulse_stop(input logic dv);
    d = dv; #10;
    stop = 1'b1; #10;
    d = !dv; #10;       // d moves while stop is high: no effect
    stop = 1'b0; #10;
  endtask

  initial begin
    #20;
    expect_q(1'b0, "in reset");
    rst_n = 1'b1; #10;
    pulse_stop(1'b0); expect_q(1'b0, "captured 0");
    pulse_stop(1'b0); expect_q(1'b0, "captured 0 again");
    d = 1'b1; #20; expect_q(1'b0, "no stop edge");
    pulse_stop(1'b1); expect_q(1'b1, "captured 1");
    pulse_stop(1'b0); expect_q(1'b1, "held after 0");
    pulse_stop(1'b0); expect_q(1'b1, "held after 0 again");
    // asynchronous reset, no clock edge
    #3 rst_n = 1'b0; #1 expect_q(1'b0, "async reset");
    pulse_stop(1'b1); expect_q(1'b0, "reset blocks capture");
    rst_n = 1'b1; #10;
    // random sequence against a reference model
    model_q = 1'b0;
    repeat (200) begin
      automatic logic dv = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 15) == 0) begin
        rst_n = 1'b0; #5; rst_n = 1'b1; #5;
        model_q = 1'b0;
      end
      pulse_stop(dv);
      if (!model_q) model_q = dv;
      expect_q(model_q, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
