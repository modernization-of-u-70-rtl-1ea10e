// tm_registrar: timing message registering device.
//
// Records which timing messages appeared in one accelerator cycle and when.
// RAM1 stores the message words and RAM2, at the same address, the time of
// their arrival as counted by the Time Marks Counter (TIME_W bits of 5 kHz
// time marks, started by str at the beginning of the cycle). Each incoming
// message (st0) starts the clock generator, which issues five strobes on
// consecutive clocks (the message and the time count are latched when
// st0 arrives, so both words carry the time of arrival):
//   w1  write the Command Word to RAM1 and the time to RAM2
//   w2  increment the common Address Counter
//   w3  write the Data Word to RAM1 and the time to RAM2
//   w4  increment the Address Counter
//   w5  end of the sequence (ready for the next message)
// so one message fills two addresses. With SKIP_NULL set, messages with
// event code zero (bare 10 kHz clock pulses) are not recorded.
//
// Host side (the crate's SBC): ld_addr loads the Address Counter from
// ld_val (the D[7..0] input), rd reads RAM1/RAM2 at the counter into
// rd_code/rd_time on the next clock and advances it, rst clears both
// counters and stops the time count.
//
// Diagnostics: status = {zero_cnt, time_ovf, addr_ovf}. addr_ovf: the
// Address Counter ran past its last address (abnormal number of messages;
// recording stops until rst). time_ovf: the Time Marks Counter wrapped (no
// restart). zero_cnt: at cycle_end the Address Counter was zero (no message
// in the cycle). irq rises on cycle_end or on an overflow; irq_ack clears
// irq and status.
//
// The RAMs, counters, strobes w1..w5, 8-bit addresses and 16-bit data, the
// three status conditions and the IRQ causes follow the document; the order
// of the strobes, the read port and SKIP_NULL are this design's choices.
module tm_registrar
  import gts_pkg::*;
#(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned TIME_W    = 16,
  parameter bit          SKIP_NULL = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              st0,
  input  tm_t               tm,
  input  logic              time_mark,
  input  logic              str,
  input  logic              rst,
  input  logic              cycle_end,
  input  logic              ld_addr,
  input  logic [ADDR_W-1:0] ld_val,
  input  logic              rd,
  output word_t             rd_code,
  output logic [TIME_W-1:0] rd_time,
  output logic [ADDR_W-1:0] addr,
  output logic [TIME_W-1:0] time_cnt,
  output logic [2:0]        status,
  output logic              irq,
  input  logic              irq_ack
);

  word_t             ram1 [2**ADDR_W];
  logic [TIME_W-1:0] ram2 [2**ADDR_W];

  logic [5:1] w;          // one-hot strobe chain
  tm_t        tm_l;
  logic [TIME_W-1:0] time_l;
  logic       t_run, full;

  wire accept = st0 && !(|w) && !(SKIP_NULL && event_of(tm) == '0);

  // Clock generator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w <= '0; tm_l <= '0; time_l <= '0;
    end else begin
      w <= {w[4:1], accept};
      if (accept) begin
        tm_l   <= tm;
        time_l <= time_cnt;
      end
    end
  end

  // RAM1 and RAM2.
  always_ff @(posedge clk) begin
    if ((w[1] || w[3]) && !full) begin
      ram1[addr] <= w[1] ? tm_l.cw : tm_l.dw;
      ram2[addr] <= time_l;
    end
    if (rd) begin
      rd_code <= ram1[addr];
      rd_time <= ram2[addr];
    end
  end

  // Address Counter, Time Marks Counter, status and IRQ.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; full <= 1'b0; time_cnt <= '0; t_run <= 1'b0;
      status <= '0; irq <= 1'b0;
    end else begin
      if (rst) begin
        addr <= '0; full <= 1'b0; time_cnt <= '0; t_run <= 1'b0;
      end else begin
        if (ld_addr) begin
          addr <= ld_val;
        end else if (((w[2] || w[4]) && !full) || rd) begin
          addr <= addr + 1'b1;
          if (!rd && addr == '1) full <= 1'b1;
        end
        if (str) begin
          t_run    <= 1'b1;
          time_cnt <= '0;
        end else if (t_run && time_mark) begin
          time_cnt <= time_cnt + 1'b1;
        end
      end

      if (irq_ack) begin
        irq    <= 1'b0;
        status <= '0;
      end else begin
        if ((w[2] || w[4]) && !full && addr == '1 && !rst) begin
          status[0] <= 1'b1;
          irq       <= 1'b1;
        end
        if (t_run && time_mark && time_cnt == '1 && !rst && !str) begin
          status[1] <= 1'b1;
          irq       <= 1'b1;
        end
        if (cycle_end) begin
          if (addr == '0 && !full) status[2] <= 1'b1;
          irq <= 1'b1;
        end
      end
    end
  end

endmodule
