// tma_task_admin: task administrator of the TM archiving device.
//
// A small micro-program automaton that runs one of three tasks, chosen by
// command bytes from the external computer on the serial port:
//   0x01  task 1, archiving: the default, entered at power-on;
//   0x02  task 2, transfer: asks the memory dispatcher for a flush and a
//         transfer, and sends every 16-bit word of the stream as two bytes,
//         high byte first; back to task 1 after the last word;
//   0x03  task 3, time correction: the next four bytes (high first) are the
//         new RTC seconds value, written through the RTC dispatcher; back to
//         task 1 when the RTC has taken it.
// In every task the decoded timing messages whose event code is not zero
// are passed on to the memory dispatcher's buffer, so archiving never
// stops. Every FLUSH_SEC seconds of the RTC (10 s, the buffering period)
// the administrator asks the memory dispatcher to move the buffer into the
// FLASH. Unknown command bytes are ignored.
//
// The three tasks, the start of task 1 at switch-on and the 10 s buffering
// follow the document; the command codes, the byte order and the skipping
// of bare clock messages are this design's choices.
module tma_task_admin
  import gts_pkg::*;
#(
  parameter int unsigned FLUSH_SEC = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // decoded timing messages
  input  logic        in_valid,
  input  tm_t         in_tm,
  output logic        tm_valid,
  output tm_t         tm,
  // serial port dispatcher
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic        tx_valid,
  output logic [7:0]  tx_byte,
  input  logic        tx_ready,
  // memory dispatcher
  output logic        flush,
  output logic        xfer_start,
  output task_e       task_code,
  input  logic        out_valid,
  input  word_t       out_word,
  input  logic        out_last,
  output logic        out_ready,
  // RTC dispatcher
  output logic        set_time,
  output logic [31:0] set_value,
  input  logic        set_done,
  input  logic        sec_tick
);

  task_e                          cur;
  logic [$clog2(FLUSH_SEC+1)-1:0] secs;
  logic [2:0]                     nbytes;
  logic                           lo_half, set_wait;

  assign task_code = cur;

  // Messages to the buffer.
  assign tm_valid = in_valid && (event_of(in_tm) != '0);
  assign tm       = in_tm;

  // Transfer: two bytes per stream word.
  assign tx_valid  = (cur == TASK_TRANSFER) && out_valid;
  assign tx_byte   = lo_half ? out_word[7:0] : out_word[15:8];
  assign out_ready = (cur == TASK_TRANSFER) && out_valid && lo_half && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= TASK_ARCHIVE; secs <= '0; nbytes <= '0; lo_half <= 1'b0; set_wait <= 1'b0;
      flush <= 1'b0; xfer_start <= 1'b0; set_time <= 1'b0; set_value <= '0;
    end else begin
      flush      <= 1'b0;
      xfer_start <= 1'b0;
      set_time   <= 1'b0;

      if (sec_tick) begin
        if (secs == ($bits(secs))'(FLUSH_SEC - 1)) begin
          secs  <= '0;
          flush <= 1'b1;
        end else begin
          secs <= secs + 1'b1;
        end
      end

      unique case (cur)
        TASK_ARCHIVE: begin
          lo_half <= 1'b0;
          if (rx_valid && rx_byte == 8'h02) begin
            cur        <= TASK_TRANSFER;
            flush      <= 1'b1;
            xfer_start <= 1'b1;
          end else if (rx_valid && rx_byte == 8'h03) begin
            cur      <= TASK_SET_TIME;
            nbytes   <= '0;
            set_wait <= 1'b0;
          end
        end
        TASK_TRANSFER: begin
          if (tx_valid && tx_ready) begin
            lo_half <= !lo_half;
            if (lo_half && out_last) cur <= TASK_ARCHIVE;
          end
        end
        TASK_SET_TIME: begin
          if (!set_wait) begin
            if (rx_valid) begin
              set_value <= {set_value[23:0], rx_byte};
              if (nbytes == 3'd3) begin
                set_time <= 1'b1;
                set_wait <= 1'b1;
              end
              nbytes <= nbytes + 1'b1;
            end
          end else if (set_done) begin
            cur <= TASK_ARCHIVE;
          end
        end
        default: cur <= TASK_ARCHIVE;
      endcase
    end
  end

endmodule
