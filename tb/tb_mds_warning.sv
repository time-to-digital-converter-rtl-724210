// Self-checking testbench for mds_warning: random thermometer codes are
// applied, then sampled; max_count must equal the number of ones and warn
// must be (count > threshold), both one clock after the sample pulse, and
// both must hold between samples.  A sample taken right after the code
// changes (inside the two-flop synchroniser) must still report the old code.
module tb_mds_warning;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 4;
  localparam int unsigned CW = 3;

  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  logic [N-1:0] q = '0;
  logic [CW-1:0] threshold = 3'd2;
  logic [CW-1:0] max_count;
  logic warn;
  int checks = 0, failures = 0;
  int exp_count = 0;
  logic exp_warn = 1'b0;

  mds_warning #(.N(N)) dut (.*);

  always #5000 clk = !clk;

  initial begin : watchdog
    #(10000 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input string what);
    checks++;
    if (max_count !== CW'(exp_count) || warn !== exp_warn) begin
      failures++;
      $display("FAIL t=%0t %s: count=%0d warn=%b expected %0d %b",
               $time, what, max_count, warn, exp_count, exp_warn);
    end
  endtask

  task automatic do_sample();
    @(negedge clk) sample = 1'b1;
    @(negedge clk) sample = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    expect_out("reset");
    rst_n = 1'b1;
    repeat (300) begin
      automatic int ones = $urandom_range(0, N);
      #1234 q = N'((1 << ones) - 1);        // asynchronous to clk
      threshold = CW'($urandom_range(0, N));
      repeat (3) @(negedge clk);
      expect_out("held until sampled");
      do_sample();
      exp_count = ones;
      exp_warn  = ones > int'(threshold);
      expect_out("sampled");
    end
    // sample issued in the same cycle the code changes: synchroniser delay
    q = '0; repeat (3) @(negedge clk); do_sample();
    exp_count = 0; exp_warn = 1'b0; expect_out("cleared code");
    threshold = 3'd1;
    @(negedge clk) q = 4'b1111; sample = 1'b1;
    @(negedge clk) sample = 1'b0;
    expect_out("sample inside synchroniser sees old code");
    repeat (2) @(negedge clk); do_sample();
    exp_count = 4; exp_warn = 1'b1; expect_out("next sample sees new code");
    // asynchronous reset
    #1000 rst_n = 1'b0; #10;
    exp_count = 0; exp_warn = 1'b0; expect_out("reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
