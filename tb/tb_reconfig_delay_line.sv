// Self-checking testbench for reconfig_delay_line at its defaults (six
// sections, 600 ps buffers): for the settings used in the prototype
// experiment (101101, 101100, 101110), the extremes and random settings,
// a rising and a falling edge must both come out exactly s * 600 ps later.
module tb_reconfig_delay_line;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SECTIONS = 6;
  localparam int unsigned BUF = 600;

  logic a = 1'b0;
  logic [SECTIONS-1:0] s = '0;
  logic y;
  int checks = 0, failures = 0;

  reconfig_delay_line dut (.a(a), .s(s), .y(y));

  initial begin : watchdog
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_setting(input logic [SECTIONS-1:0] sv);
    int unsigned d;
    s = sv;
    d = int'(sv) * BUF;
    #50000;                              // line settled at a = 0
    for (int e = 0; e < 2; e++) begin
      automatic logic v = (e == 0);
      a = v;
      if (d > 0) begin
        #(d - 1);
        checks++; if (y !== !v) begin failures++; $display("FAIL s=%b edge early", sv); end
        #1;
      end
      #1;
      checks++; if (y !== v) begin failures++; $display("FAIL s=%b edge not out after %0d ps", sv, d); end
      #50000;
    end
  endtask

  initial begin
    #10000;
    try_setting(6'b101101);
    try_setting(6'b101100);
    try_setting(6'b101110);
    try_setting(6'b000000);
    try_setting(6'b111111);
    repeat (20) try_setting(SECTIONS'($urandom_range(0, 63)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
