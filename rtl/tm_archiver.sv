// tm_archiver: portable TM archiving device.
//
// Plugged onto a local timing network, it keeps every timing message with
// its real-time stamp for days, independently of the control system. A
// Manchester-II decoder (mil_decoder) takes the messages off the line; the
// task administrator (tma_task_admin) passes them on and runs the tasks
// ordered over the RS-232 port (tma_serial_dispatcher); the memory
// dispatcher (tma_mem_dispatcher) buffers them, stamps them with the time
// formed by the RTC dispatcher (tma_rtc_dispatcher) from the RTC chip's
// 32-bit counter, archives them in the FLASH ring and keeps its pointer in
// the FRAM. The FLASH, FRAM and RTC chips are outside; their ports are
// brought out (see tma_mem_dispatcher and tma_rtc_dispatcher for the
// handshakes).
//
// The block structure follows the document's block diagram of the device;
// the chips' interfaces and the serial protocol are this design's choices.
module tm_archiver
  import gts_pkg::*;
#(
  parameter int unsigned HALF_BIT  = 6,
  parameter int unsigned BAUD_DIV  = 104,
  parameter int unsigned FLASH_AW  = 21,
  parameter int unsigned SECTOR_AW = 15,
  parameter int unsigned FRAM_AW   = 12,
  parameter int unsigned BUF_DEPTH = 256,
  parameter int unsigned SUB_DIV   = 1200,
  parameter int unsigned POLL_DIV  = 12000,
  parameter int unsigned FLUSH_SEC = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mil_line_t           ltn,
  input  logic                rxd,
  output logic                txd,
  // FLASH chip
  output logic                fl_req,
  output fl_op_e              fl_op,
  output logic [FLASH_AW-1:0] fl_addr,
  output word_t               fl_wdata,
  input  word_t               fl_rdata,
  input  logic                fl_ack,
  // FRAM chip
  output logic                fr_req,
  output logic                fr_we,
  output logic [FRAM_AW-1:0]  fr_addr,
  output word_t               fr_wdata,
  input  word_t               fr_rdata,
  input  logic                fr_ack,
  // RTC chip
  output logic                rtc_req,
  output logic                rtc_we,
  output logic [31:0]         rtc_wdata,
  input  logic [31:0]         rtc_rdata,
  input  logic                rtc_ack,
  // front panel
  output task_e               task_code,
  output logic                buf_ovf,
  output logic                rx_err,
  output logic [31:0]         wp,
  output logic                wrapped
);

  // Line decoder.
  logic   d_clk, d_valid, d_ok, d_cwp, d_dwp, d_cerr, d_ferr;
  event_t d_event;
  tm_t    d_tm;
  mil_decoder #(.HALF_BIT(HALF_BIT)) u_dec (
    .clk, .rst_n, .line(ltn),
    .clk_pulse(d_clk), .cw_event(d_event),
    .tm_valid(d_valid), .tm(d_tm), .tm_ok(d_ok),
    .cw_perr(d_cwp), .dw_perr(d_dwp), .code_err(d_cerr), .frame_err(d_ferr)
  );

  // Serial port.
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_byte, tx_byte;
  tma_serial_dispatcher #(.BAUD_DIV(BAUD_DIV)) u_ser (
    .clk, .rst_n, .rxd, .txd,
    .rx_valid, .rx_byte, .rx_err,
    .tx_valid, .tx_byte, .tx_ready
  );

  // RTC dispatcher.
  logic        set_time, set_done, sec_tick;
  logic [31:0] set_value, now_sec;
  logic [15:0] now_sub;
  tma_rtc_dispatcher #(.SUB_DIV(SUB_DIV), .POLL_DIV(POLL_DIV)) u_rtc (
    .clk, .rst_n,
    .rtc_req, .rtc_we, .rtc_wdata, .rtc_rdata, .rtc_ack,
    .set_time, .set_value, .set_done,
    .sec(now_sec), .sub(now_sub), .sec_tick
  );

  // Task administrator.
  logic  a_valid, flush, xfer_start, out_valid, out_last, out_ready;
  tm_t   a_tm;
  word_t out_word;
  tma_task_admin #(.FLUSH_SEC(FLUSH_SEC)) u_adm (
    .clk, .rst_n,
    .in_valid(d_valid && d_ok), .in_tm(d_tm),
    .tm_valid(a_valid), .tm(a_tm),
    .rx_valid, .rx_byte, .tx_valid, .tx_byte, .tx_ready,
    .flush, .xfer_start, .task_code,
    .out_valid, .out_word, .out_last, .out_ready,
    .set_time, .set_value, .set_done, .sec_tick
  );

  // Memory dispatcher.
  logic m_ready, m_flushing;
  tma_mem_dispatcher #(
    .FLASH_AW(FLASH_AW), .SECTOR_AW(SECTOR_AW), .FRAM_AW(FRAM_AW), .BUF_DEPTH(BUF_DEPTH)
  ) u_mem (
    .clk, .rst_n,
    .tm_valid(a_valid), .tm(a_tm), .now_sec, .now_sub,
    .buf_ovf,
    .flush, .xfer_start, .task_code,
    .ready(m_ready), .flushing(m_flushing),
    .wp_out(wp), .wrapped_out(wrapped),
    .out_valid, .out_word, .out_last, .out_ready,
    .fl_req, .fl_op, .fl_addr, .fl_wdata, .fl_rdata, .fl_ack,
    .fr_req, .fr_we, .fr_addr, .fr_wdata, .fr_rdata, .fr_ack
  );

endmodule
