// Self-checking testbench for mds_tdc with 10 ps buffers and no setup time.
// 1. Fresh measurements after reset reproduce the thermometer table of the
//    basic TDC (0.5, 1.5, 2.5, 3.5 buffer delays -> 1000 .. 1111) and give
//    0000 when stop comes before start.
// 2. The two cases of the maximum-hold example: from 1100 a shorter interval
//    keeps 1100, a longer one gives 1110.
// 3. A random sequence of intervals must always show the largest so far.
// Codes are printed and compared as Q0Q1Q2Q3 (q[0] first).
module tb_mds_tdc;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 4;
  localparam int unsigned TAU = 10;

  logic start = 1'b0, stop = 1'b0, rst_n = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  mds_tdc #(.N(N), .TAU_PS('{default: TAU}), .T_SETUP_PS(0)) dut (
    .start(start), .stop(stop), .rst_n(rst_n), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Number of ones expected for one interval (dt in ps, never a multiple of TAU).
  function automatic int ones_for(int dt);
    if (dt < 0) return 0;
    return (dt / int'(TAU) + 1 > int'(N)) ? int'(N) : dt / int'(TAU) + 1;
  endfunction

  function automatic logic [N-1:0] therm(int ones);
    logic [N-1:0] c = '0;
    for (int i = 0; i < ones; i++) c[i] = 1'b1;
    return c;
  endfunction

  // start rises, stop rises dt later (or earlier if dt < 0); both fall later.
  task automatic measure(input int dt);
    if (dt >= 0) begin
      start = 1'b1; #(dt); stop = 1'b1;
    end else begin
      stop = 1'b1; #(-dt); start = 1'b1;
    end
    #100; start = 1'b0; stop = 1'b0; #100;
  endtask

  task automatic expect_code(input logic [N-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: Q0..Q3=%b%b%b%b expected %b%b%b%b", what,
               q[0], q[1], q[2], q[3], e[0], e[1], e[2], e[3]);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; #20; rst_n = 1'b1; #20;
  endtask

  initial begin
    int best;
    #50;
    expect_code('0, "reset");
    // 1. table of the basic TDC, one fresh measurement each
    do_reset(); measure(5);   expect_code(4'b0001, "0.5 buffers");
    do_reset(); measure(15);  expect_code(4'b0011, "1.5 buffers");
    do_reset(); measure(25);  expect_code(4'b0111, "2.5 buffers");
    do_reset(); measure(35);  expect_code(4'b1111, "3.5 buffers");
    do_reset(); measure(-7);  expect_code(4'b0000, "stop before start");
    // 2. maximum-hold example
    do_reset(); measure(15);  expect_code(4'b0011, "held 1100 set up");
    measure(5);               expect_code(4'b0011, "case (a): 0.5 keeps 1100");
    measure(20 + 3);          expect_code(4'b0111, "case (b): 2 gives 1110");
    // 3. random intervals, running maximum
    do_reset(); best = 0;
    repeat (300) begin
      automatic int dt = $urandom_range(0, 45);
      if (dt % int'(TAU) == 0) dt++;
      if ($urandom_range(0, 20) == 0) begin do_reset(); best = 0; end
      measure(dt);
      if (ones_for(dt) > best) best = ones_for(dt);
      expect_code(therm(best), "random running maximum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
