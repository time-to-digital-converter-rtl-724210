// Self-checking testbench for the maximum delay sensor at its default
// parameters (4 stages, 10 ps buffers, 30 ps DL, 5 ps setup).
//   1. The reference waveform: 10 ns clock, rst and mode low for the first
//      clock, then intervals of 20, 10 and 40 ps in the next three clocks
//      must give Q0Q1Q2Q3 = 1100, 1100 (held), 1111, each taking effect at
//      the ep edge of its own cycle.
//   2. A sweep of the interval from 4 to 40 ps in 2 ps steps, each after a
//      reset, against the formula ones = #{i : dt >= 5 + 10 i}.
//   3. Falling-edge paths with ntrn = 1, a measurement in initialising mode
//      (ep starts, clk stops) and cycles in which ep does not toggle.
// dt is measured from the DL-delayed clock, i.e. ep rises 30 ps + dt after
// the clock edge.  Codes are printed as Q0Q1Q2Q3.
module tb_mds;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 4;
  localparam int T_DL = 30, T_SU = 5, TAU = 10;
  localparam int PERIOD = 10000;

  logic ep = 1'b0, clk = 1'b0, mode = 1'b0, ntrn = 1'b0, rst_n = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  mds dut (.ep(ep), .clk(clk), .mode(mode), .ntrn(ntrn), .rst_n(rst_n), .q(q));

  initial begin : watchdog
    #(PERIOD * 400);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // First rising edge at 5 ns, as in the reference waveform.
  initial begin
    #(PERIOD / 2);
    forever begin clk = 1'b1; #(PERIOD / 2); clk = 1'b0; #(PERIOD / 2); end
  end

  function automatic logic [N-1:0] therm(int ones);
    logic [N-1:0] c = '0;
    for (int i = 0; i < ones && i < int'(N); i++) c[i] = 1'b1;
    return c;
  endfunction

  function automatic int ones_for(int dt);
    int n = 0;
    for (int i = 0; i < int'(N); i++) if (dt >= T_SU + TAU * i) n++;
    return n;
  endfunction

  task automatic expect_code(input logic [N-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL t=%0t %s: Q0..Q3=%b%b%b%b expected %b%b%b%b", $time, what,
               q[0], q[1], q[2], q[3], e[0], e[1], e[2], e[3]);
    end
  endtask

  // One measurement cycle: the active ep edge comes T_DL + dt after the
  // clock edge; the code is checked 1 ps before and 1 ps after that edge.
  task automatic measure(input int dt, input logic [N-1:0] pre,
                         input logic [N-1:0] post, input string what);
    @(posedge clk);
    #(T_DL + dt - 1); expect_code(pre, {what, " (before ep edge)"});
    #1 ep = !ntrn;
    #1 expect_code(post, {what, " (at ep edge)"});
    #(PERIOD / 2); ep = ntrn;
  endtask

  // Reset in initialising mode during one clock low phase.
  task automatic reinit(input logic pol);
    @(negedge clk);
    mode = 1'b0; rst_n = 1'b0; ntrn = pol; ep = pol;
    #1000 rst_n = 1'b1; mode = 1'b1;
  endtask

  initial begin
    // 1. reference waveform
    #(PERIOD);            // t = 10 ns: leave initialisation
    expect_code('0, "initialised");
    rst_n = 1'b1; mode = 1'b1;
    measure(20, 4'b0000, 4'b0011, "2nd clock, 20 ps");
    measure(10, 4'b0011, 4'b0011, "3rd clock, 10 ps held");
    measure(40, 4'b0011, 4'b1111, "4th clock, 40 ps");
    @(posedge clk); #2000 expect_code(4'b1111, "no ep toggle keeps code");

    // 2. sweep 4 .. 40 ps
    for (int dt = 4; dt <= 40; dt += 2) begin
      reinit(1'b0);
      measure(dt, 4'b0000, therm(ones_for(dt)), $sformatf("sweep %0d ps", dt));
    end

    // 3a. falling-edge paths
    reinit(1'b1);
    measure(12, 4'b0000, therm(ones_for(12)), "falling 12 ps");
    measure(8, therm(ones_for(12)), therm(ones_for(12)), "falling 8 ps held");
    measure(33, therm(ones_for(12)), therm(ones_for(33)), "falling 33 ps");
    // 3b. initialising mode: ep starts, clk stops
    reinit(1'b0);
    mode = 1'b0;
    @(negedge clk); #(PERIOD / 2 - 22) ep = 1'b1;   // ep 22 ps before clk
    @(posedge clk); #1 expect_code(therm(ones_for(22)), "mode 0: ep starts, clk stops");
    #(PERIOD / 4) ep = 1'b0;
    @(posedge clk); #1 expect_code(therm(ones_for(22)), "mode 0: ep quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
