// Testbench for sensor sizes beyond the four-stage default, all with 10 ps
// buffers and a 5 ps setup time:
//   - 8 and 16 stages (30 ps DL, 100 MHz clock), random end-point delays
//     over and beyond their windows of 75 and 155 ps;
//   - the aging example: a 1 GHz block whose 800 ps critical path slows by
//     up to 80 ps.  Nine stages behind an 800 ps DL cover it.  The path's
//     worst delay grows by 16 ps per epoch; after each epoch the warning
//     unit samples the code and must warn once more than five stages
//     (a slow-down of 55 ps or more) are set.
module tb_mds_sizes;
  timeunit 1ps; timeprecision 1ps;

  localparam int NA = 9;
  localparam int THRESH = 5;

  logic rst8 = 1'b0, rst16 = 1'b0, rsta = 1'b0;
  logic [7:0]    q8;
  logic [15:0]   q16;
  logic [NA-1:0] qa;
  int c8, f8, c16, f16, ca, fa;
  int dt8 = 85, dt16 = 165, dta = 0;

  logic wclk = 1'b0, sample = 1'b0;
  logic [3:0] max_count;
  logic warn;
  int checks = 0, failures = 0;
  int n_warn = 0;

  mds_size_run #(.N(8))  u8  (.dt_max(dt8),  .rst_n(rst8),  .q(q8),  .checks(c8),  .failures(f8));
  mds_size_run #(.N(16)) u16 (.dt_max(dt16), .rst_n(rst16), .q(q16), .checks(c16), .failures(f16));
  mds_size_run #(.N(NA), .T_DL_PS(800), .PERIOD_PS(1000)) ua (
    .dt_max(dta), .rst_n(rsta), .q(qa), .checks(ca), .failures(fa));

  mds_warning #(.N(NA), .CW(4)) u_warn (
    .clk(wclk), .rst_n(1'b1), .q(qa), .sample(sample), .threshold(4'(THRESH)),
    .max_count(max_count), .warn(warn));

  always #5000 wclk = !wclk;

  initial begin : watchdog
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + c8 + c16 + ca, failures + f8 + f16 + fa + 1);
    $finish;
  end

  function automatic int ones_for(int dt);
    int n = 0;
    if ((dt - 5) % 10 == 0) dt++;
    for (int i = 0; i < NA; i++) if (dt >= 5 + 10 * i) n++;
    return n;
  endfunction

  initial begin
    #20000;
    rst8 = 1'b1; rst16 = 1'b1;
    // aging: six epochs of 200 cycles at 1 GHz
    for (int e = 0; e <= 5; e++) begin
      rsta = (e > 0) | rsta;
      dta = 16 * e;
      if (e == 0) begin #5000 rsta = 1'b1; end
      #200000;
      @(negedge wclk) sample = 1'b1;
      @(negedge wclk) sample = 1'b0;
      checks++;
      if (int'(max_count) != ones_for(dta) || warn != (ones_for(dta) > THRESH)) begin
        failures++;
        $display("FAIL epoch %0d (+%0d ps): count %0d warn %b, expected %0d %b",
                 e, dta, max_count, warn, ones_for(dta), ones_for(dta) > THRESH);
      end else
        $display("epoch %0d: worst path 800+%0d ps, %0d stages set, warn=%b", e, dta, max_count, warn);
      if (warn) n_warn++;
    end
    // sizes: a reset half way, then more random cycles
    rst8 = 1'b0; rst16 = 1'b0; #20000; rst8 = 1'b1; rst16 = 1'b1;
    #2000000;
    checks++;
    if (n_warn == 0 || c8 < 100 || c16 < 100 || ca < 100) begin
      failures++;
      $display("FAIL too few events: warnings %0d, checks %0d/%0d/%0d", n_warn, c8, c16, ca);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + c8 + c16 + ca, failures + f8 + f16 + fa);
    $finish;
  end
endmodule
