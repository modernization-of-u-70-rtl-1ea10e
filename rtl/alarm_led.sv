// alarm_led: front-panel LED drivers for real-time alarm signals.
//
// Each of the N alarm inputs lights its LED while the alarm is present and
// keeps it lit for HOLD more clocks after the alarm ends, so that a
// one-clock alarm pulse (a lost message, a parity error) is still seen by
// an operator. Every new alarm restarts the hold time. Default HOLD is
// 1,200,000 clocks = 0.1 s at 12 MHz.
//
// Interface: alarm[N] in (pulses or levels, synchronous to clk), led[N]
// out (registered, active high). Timing: the LED turns on at the first
// clock edge that sees the alarm and stays on for HOLD edges after the
// last edge that saw it.
//
// LED indication of the alarm signals on the modules' front panels follows
// the document; which alarms get an LED and the hold time are this
// design's choices.
module alarm_led #(
  parameter int unsigned N    = 1,
  parameter int unsigned HOLD = 1_200_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] alarm,
  output logic [N-1:0] led
);

  localparam int unsigned CW = $clog2(HOLD + 1);

  for (genvar i = 0; i < N; i++) begin : g_led
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt    <= '0;
        led[i] <= 1'b0;
      end else if (alarm[i]) begin
        cnt    <= CW'(HOLD);
        led[i] <= 1'b1;
      end else if (cnt != 0) begin
        cnt    <= cnt - 1'b1;
        led[i] <= 1'b1;
      end else begin
        led[i] <= 1'b0;
      end
    end
  end

endmodule
