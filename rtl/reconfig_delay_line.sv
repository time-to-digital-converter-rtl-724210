// Reconfigurable delay line used as the monitored path in the prototype.
//
// Section i holds 2^i buffers and a 2:1 multiplexer controlled by s[i]:
// s[i] = 1 sends the signal through the buffers, s[i] = 0 bypasses them.
// Six sections of 1, 2, 4, 8, 16 and 32 buffers give a delay of
// s * BUF_PS, from 0 (s = 000000) to 63 buffer delays (s = 111111).
// The section structure and the six control bits follow the original design; the
// delay of one buffer is not given there, and the multiplexers are taken
// as delay-free.  The buffers are delay_buf models, the multiplexers logic.
module reconfig_delay_line #(
  parameter int unsigned SECTIONS = 6,    // control bits S0..S(SECTIONS-1)
  parameter int unsigned BUF_PS   = 600   // delay of one buffer, ps
) (
  input  logic                a,  // signal to delay
  input  logic [SECTIONS-1:0] s,  // delay setting, in buffers
  output logic                y   // delayed signal
);
  timeunit 1ps; timeprecision 1ps;

  logic [SECTIONS:0] sec;  // sec[i]: input of section i

  assign sec[0] = a;

  for (genvar i = 0; i < SECTIONS; i++) begin : g_sec
    localparam int unsigned NBUF = 1 << i;
    logic [NBUF:0] chain;
    assign chain[0] = sec[i];
    for (genvar b = 0; b < NBUF; b++) begin : g_buf
      delay_buf #(.DELAY_PS(BUF_PS)) u_buf (.a(chain[b]), .y(chain[b+1]));
    end
    assign sec[i+1] = s[i] ? chain[NBUF] : sec[i];
  end

  assign y = sec[SECTIONS];

endmodule
