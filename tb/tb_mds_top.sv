// End-to-end testbench of the sensor prototype at its default parameters
// (100 MHz clock, tau = 550/770/70 ps, 600 ps line buffers, 6.1 ns DL).
//   1. Initialise: rst_n = 0 with sel = 0.
//   2. Calibration: cal = 1, sel = 0.  A clock-manager model delays the
//      reference clock by a phase stepped up by 39 ps every three clocks.
//      The phase at which each stage first captures 1 gives the buffer
//      delays, which must match tau_i within one phase step.
//   3. Measurement: cal = 0, sel = 1, delay line set to 101101, 101100 and
//      101110 in turn without reset.  The code must be the longest delay so
//      far: updated in steps 1 and 3, held in step 2.  Samples must report
//      the count and raise warn (threshold 2) only after step 3.
//   4. Polarity: with the line at 20 buffers the rising edge of ep comes
//      just after the delayed clock pulse, so only the far stages (which
//      still see the pulse) capture 1, while the falling edge, measured
//      with ntrn = 1, falls inside the pulse and gives 1100.
// Expected codes are computed from the clock period, buffer and DL delays.
// Each mechanism (initialisation, calibration capture, update, hold,
// warning, falling-edge measurement) is counted and must occur.
module tb_mds_top;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 4;
  localparam int CW = 3;
  localparam int PERIOD = 10000;
  localparam int TAU [N-1] = '{550, 770, 70};
  localparam int T_DL = 6100;
  localparam int BUF = 600;
  localparam int CAL_BUFS = 2;
  localparam int PHASE_STEP = 39;

  logic clk_ref = 1'b0, clk_shift = 1'b0, cal = 1'b0, sel = 1'b0, ntrn = 1'b0;
  logic rst_n = 1'b0, sample = 1'b0;
  logic [5:0] s = '0;
  logic [CW-1:0] threshold = 3'd2;
  logic [N-1:0] q;
  logic [CW-1:0] max_count;
  logic warn;

  int checks = 0, failures = 0;
  int n_init = 0, n_cal = 0, n_update = 0, n_hold = 0, n_warn = 0, n_fall = 0;
  int phase = 0;

  mds_top dut (.*);

  initial begin : watchdog
    #(PERIOD * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #(PERIOD / 2) clk_ref = !clk_ref;

  // Clock-manager model: the reference clock shifted by `phase`.
  always @(posedge clk_ref) begin
    automatic int p = phase;
    fork
      begin #(p) clk_shift = 1'b1; #(PERIOD / 2) clk_shift = 1'b0; end
    join_none
  end

  // Code a single measurement with the line at `setting` gives.  The
  // active ep edge (rising, or falling when fall = 1) stops the TDC; stage i
  // sees 1 if the DL-delayed clock, after i buffers, is high at that moment.
  // The clock is a pulse (high for half a period), so an edge just after it
  // ends can leave only the far stages at 1: the reference models each bit.
  function automatic logic [N-1:0] fresh_code(int setting, bit fall);
    logic [N-1:0] c = '0;
    int acc = 0;
    int r = (setting * BUF + (fall ? PERIOD / 2 : 0)) % PERIOD;
    for (int i = 0; i < N; i++) begin
      int x = ((r - T_DL - acc) % PERIOD + PERIOD) % PERIOD;
      c[i] = (x < PERIOD / 2);
      if (i < N - 1) acc += TAU[i];
    end
    return c;
  endfunction

  function automatic int ones(logic [N-1:0] c);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(c[i]);
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

  task automatic do_sample(input int e_count, input logic e_warn, input string what);
    @(negedge clk_ref) sample = 1'b1;
    @(negedge clk_ref) sample = 1'b0;
    checks++;
    if (max_count !== CW'(e_count) || warn !== e_warn) begin
      failures++;
      $display("FAIL %s: count=%0d warn=%b expected %0d %b", what, max_count, warn, e_count, e_warn);
    end
    if (warn) n_warn++;
  endtask

  // Reset with the new settings applied while the stages are held at 0.
  task automatic reinit(input logic c, input logic m, input logic pol, input logic [5:0] sv);
    @(negedge clk_ref);
    rst_n = 1'b0; sel = 1'b0;
    @(negedge clk_ref);
    cal = c; ntrn = pol; s = sv; sel = m;
    repeat (6) @(negedge clk_ref);     // let the line settle
    expect_code('0, "reset");
    n_init++;
    rst_n = 1'b1;
  endtask

  // Change the line setting when every section input is stable (2 ns after
  // the clock edge), so no glitch reaches ep.
  task automatic set_line(input logic [5:0] sv);
    @(posedge clk_ref); #2000 s = sv;
  endtask

  initial begin
    int first [N];
    logic [N-1:0] held;
    repeat (3) @(negedge clk_ref);
    expect_code('0, "power-up reset");

    // 2. calibration sweep
    reinit(1'b1, 1'b0, 1'b0, 6'b0);
    for (int i = 0; i < N; i++) first[i] = -1;
    for (phase = 0; phase <= 3200; phase += PHASE_STEP) begin
      logic [N-1:0] q_prev;
      q_prev = q;
      repeat (3) @(negedge clk_ref);
      for (int i = 0; i < N; i++)
        if (q[i] && first[i] < 0) first[i] = phase;
      if (q != q_prev) n_cal++;
    end
    checks++;
    if (first[0] < CAL_BUFS * BUF || first[0] >= CAL_BUFS * BUF + PHASE_STEP) begin
      failures++; $display("FAIL calibration: Q0 first at phase %0d", first[0]);
    end
    for (int i = 0; i < N - 1; i++) begin
      int est;
      est = first[i+1] - first[i];
      checks++;
      if (first[i+1] < 0 || est - TAU[i] >= PHASE_STEP || TAU[i] - est >= PHASE_STEP) begin
        failures++;
        $display("FAIL calibration: tau%0d estimated %0d ps, is %0d ps", i, est, TAU[i]);
      end else
        $display("calibration: tau%0d estimated %0d ps (actual %0d ps)", i, est, TAU[i]);
    end

    // 3. measurement, three delay-line settings without reset
    reinit(1'b0, 1'b1, 1'b0, 6'b101101);
    repeat (8) @(negedge clk_ref);
    held = fresh_code(45, 0);
    expect_code(held, "step 1: 101101");
    if (held != '0) n_update++;
    do_sample(ones(held), ones(held) > int'(threshold), "sample after step 1");

    set_line(6'b101100);
    repeat (8) @(negedge clk_ref);
    if ((fresh_code(44, 0) | held) == held && fresh_code(44, 0) != held) n_hold++;
    held |= fresh_code(44, 0);
    expect_code(held, "step 2: 101100 keeps the maximum");
    do_sample(ones(held), ones(held) > int'(threshold), "sample after step 2");

    set_line(6'b101110);
    repeat (8) @(negedge clk_ref);
    if ((fresh_code(46, 0) | held) != held) n_update++;
    held |= fresh_code(46, 0);
    expect_code(held, "step 3: 101110");
    do_sample(ones(held), ones(held) > int'(threshold), "sample after step 3");

    // 4. falling-edge paths: 20 buffers put the rising edge just after the
    // delayed clock pulse (far stages only) and the falling edge inside it.
    reinit(1'b0, 1'b1, 1'b0, 6'd20);
    repeat (8) @(negedge clk_ref);
    expect_code(fresh_code(20, 0), "rising edge of 20-buffer line");
    reinit(1'b0, 1'b1, 1'b1, 6'd20);
    repeat (8) @(negedge clk_ref);
    expect_code(fresh_code(20, 1), "falling edge of 20-buffer line");
    if (fresh_code(20, 1) != fresh_code(20, 0) && q == fresh_code(20, 1)) n_fall++;

    $display("mechanisms: init=%0d calibration-captures=%0d updates=%0d holds=%0d warnings=%0d falling=%0d",
             n_init, n_cal, n_update, n_hold, n_warn, n_fall);
    checks++;
    if (n_init == 0 || n_cal == 0 || n_update == 0 || n_hold == 0 || n_warn == 0 || n_fall == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
