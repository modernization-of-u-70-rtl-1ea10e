// tma_rtc_dispatcher: real-time clock dispatcher of the TM archiving device.
//
// Talks to the RTC chip's 32-bit seconds counter through a request /
// acknowledge port (rtc_req held until rtc_ack; rtc_we selects a write of
// rtc_wdata, otherwise rtc_rdata is taken on rtc_ack). It reads the counter
// right after reset and then every POLL_DIV clocks, and forms the current
// time for the memory dispatcher: sec, the RTC seconds, and sub, the time
// within the second in 100 us units (SUB_DIV clocks each), restarted
// whenever the seconds value read from the RTC changes. set_time writes set_value into the RTC
// (correction of the time setting) and pulses set_done when the chip has
// acknowledged; the sub-second count restarts from zero.
//
// The 32-bit RTC counter and the dispatcher's role follow the document;
// the RTC's protocol is not described there, so the port is a generic
// handshake, and the polling scheme and sub-second count are this design's.
module tma_rtc_dispatcher #(
  parameter int unsigned SUB_DIV  = 1200,
  parameter int unsigned POLL_DIV = 12000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        rtc_req,
  output logic        rtc_we,
  output logic [31:0] rtc_wdata,
  input  logic [31:0] rtc_rdata,
  input  logic        rtc_ack,
  input  logic        set_time,
  input  logic [31:0] set_value,
  output logic        set_done,
  output logic [31:0] sec,
  output logic [15:0] sub,
  output logic        sec_tick     // one-clock pulse when sec changes
);

  logic [$clog2(SUB_DIV)-1:0]  sub_div;
  logic [$clog2(POLL_DIV)-1:0] poll;
  logic                        valid;     // sec holds a value read from the RTC
  logic                        set_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rtc_req <= 1'b0; rtc_we <= 1'b0; rtc_wdata <= '0;
      set_done <= 1'b0; sec <= '0; sub <= '0; sec_tick <= 1'b0;
      sub_div <= '0; poll <= ($bits(poll))'(POLL_DIV - 1); valid <= 1'b0; set_pend <= 1'b0;
    end else begin
      set_done <= 1'b0;
      sec_tick <= 1'b0;

      if (set_time) begin
        set_pend  <= 1'b1;
        rtc_wdata <= set_value;
      end

      // Sub-second count.
      if (sub_div == ($bits(sub_div))'(SUB_DIV - 1)) begin
        sub_div <= '0;
        if (sub != 16'd9999) sub <= sub + 1'b1;
      end else begin
        sub_div <= sub_div + 1'b1;
      end

      if (poll != ($bits(poll))'(POLL_DIV - 1)) poll <= poll + 1'b1;

      // RTC transactions.
      if (rtc_req) begin
        if (rtc_ack) begin
          rtc_req <= 1'b0;
          if (rtc_we) begin
            rtc_we   <= 1'b0;
            set_done <= 1'b1;
            sec      <= rtc_wdata;
            sub      <= '0;
            sub_div  <= '0;
            sec_tick <= 1'b1;
            valid    <= 1'b1;
          end else if (!valid || rtc_rdata != sec) begin
            sec      <= rtc_rdata;
            sub      <= '0;
            sub_div  <= '0;
            sec_tick <= valid;
            valid    <= 1'b1;
          end
        end
      end else if (set_pend && !set_time) begin
        set_pend <= 1'b0;
        rtc_req  <= 1'b1;
        rtc_we   <= 1'b1;
      end else if (poll == ($bits(poll))'(POLL_DIV - 1)) begin
        poll    <= '0;
        rtc_req <= 1'b1;
        rtc_we  <= 1'b0;
      end
    end
  end

endmodule
