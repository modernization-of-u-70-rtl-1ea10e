// tb_rtc_model: behavioural model of the RTC chip (testbench only).
// A 32-bit seconds counter that advances every SEC_CLKS clocks; a write
// through the request/acknowledge port sets it and restarts the second.
// Two clocks of latency, one-clock ack.
module tb_rtc_model #(
  parameter int SEC_CLKS = 1000
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        ack
);
  logic [31:0] count = 32'd1000;
  int div = 0, state = 0;

  initial begin ack = 0; rdata = 0; end

  always @(posedge clk) begin
    div++;
    if (div == SEC_CLKS) begin div = 0; count++; end
    case (state)
      0: if (req) state = 1;
      1: begin
           if (we) begin count = wdata; div = 0; end
           rdata <= count;
           ack <= 1; state = 2;
         end
      default: begin ack <= 0; state = 0; end
    endcase
  end
endmodule
