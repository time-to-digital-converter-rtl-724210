// Self-checking testbench for delay_buf: every edge of pulses longer than
// the delay must reappear exactly DELAY_PS later (checked 1 ps before and
// 1 ps after), and a pulse shorter than the delay must not appear at all.
module tb_delay_buf;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 100;

  logic a = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  delay_buf #(.DELAY_PS(D)) dut (.a(a), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(input logic e, input string what);
    checks++;
    if (y !== e) begin failures++; $display("FAIL t=%0t %s: y=%b expected %b", $time, what, y, e); end
  endtask

  initial begin
    #(3 * D);
    expect_y(1'b0, "settled low");
    repeat (100) begin
      automatic logic v = !a;
      automatic int unsigned gap = $urandom_range(D + 10, 3 * D);
      a = v;
      #(D - 1); expect_y(!v, "edge not yet out");
      #2;       expect_y(v, "edge out after delay");
      #(gap - D - 1);
      if ($urandom_range(0, 4) == 0) begin
        // glitch shorter than the delay: swallowed
        a = !v; #(D / 5); a = v;
        #(2 * D); expect_y(v, "short glitch swallowed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
