// tmr: timing message receiver on a local multidrop network.
//
// A Manchester-II decoder (mil_decoder) turns the serial timing messages
// into 16-bit Command and Data Words. Two paths use the event code:
//   - DMUX1: when the Command Word arrives (the 10 kHz clock pulse), the
//     output pulse_out[event code] goes high for PULSE_CYC clocks, and
//     clk_pulse_out marks the clock pulse itself;
//   - DMUX2 + mask: when the whole message has arrived, the event line of
//     DMUX2 goes through a mask register (one bit per event code, written
//     by the host) and, if open, sets the IRQ flag.
// The message that raised the flag stays in cw/dw until the host
// acknowledges with irq_ack (having read cw, dw and status), which clears
// the flag and the sticky status bits.
//
// Diagnostics: status.cw_perr / dw_perr / code_err record a parity or
// coding error of a received word, status.frame_err a malformed message,
// and status.flow_break a gap of more than FLOW_TIMEOUT clocks in the
// otherwise regular 10 kHz flow. Each of them also sets the IRQ flag so
// that the host passes the status on. status.missed shows that another
// IRQ cause came while the flag was already set.
//
// Timing: pulse_out rises 4 clocks after the end of the Command Word on
// the line, the IRQ flag 4 clocks after the end of the Data Word, so IRQ
// lags the pulses by one word time (20 us at 1 Mbit/s). DMUX1, DMUX2, the
// mask and the IRQ flag follow the document's block diagram; the pulse
// width, the time-out and the status layout are this design's choices.
module tmr
  import gts_pkg::*;
#(
  parameter int unsigned HALF_BIT     = 6,
  parameter int unsigned PULSE_CYC    = 12,
  parameter int unsigned FLOW_TIMEOUT = 1800
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mil_line_t           ltn,
  input  logic                mask_we,
  input  event_t              mask_addr,
  input  logic                mask_bit,
  input  logic                irq_ack,
  output logic [N_EVENTS-1:0] pulse_out,
  output logic                clk_pulse_out,
  output word_t               cw,
  output word_t               dw,
  output logic                irq,
  output logic [6:0]          status    // {missed, event_irq, flow_break, frame_err, code_err, dw_perr, cw_perr}
);

  logic   d_clk, d_valid, d_ok, d_cw_perr, d_dw_perr, d_code_err, d_frame_err;
  event_t d_event;
  tm_t    d_tm;

  mil_decoder #(.HALF_BIT(HALF_BIT)) u_dec (
    .clk, .rst_n, .line(ltn),
    .clk_pulse(d_clk), .cw_event(d_event),
    .tm_valid(d_valid), .tm(d_tm), .tm_ok(d_ok),
    .cw_perr(d_cw_perr), .dw_perr(d_dw_perr), .code_err(d_code_err),
    .frame_err(d_frame_err)
  );

  // DMUX1: stretched one-hot pulse of the event code.
  event_t                          p_event;
  logic [$clog2(PULSE_CYC+1)-1:0]  p_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_event <= '0; p_cnt <= '0; clk_pulse_out <= 1'b0;
    end else begin
      clk_pulse_out <= d_clk;
      if (d_clk) begin
        p_event <= d_event;
        p_cnt   <= ($bits(p_cnt))'(PULSE_CYC);
      end else if (p_cnt != 0) begin
        p_cnt <= p_cnt - 1'b1;
      end
    end
  end

  always_comb begin
    pulse_out = '0;
    if (p_cnt != 0) pulse_out[p_event] = 1'b1;
  end

  // DMUX2 and mask: tm_mask gates the decoded message by its event code.
  logic ev_irq, unused_blk;
  tm_t  unused_tm;
  tm_mask u_mask (
    .clk, .rst_n, .mask_we, .mask_addr, .mask_bit,
    .in_valid(d_valid && d_ok), .in_tm(d_tm),
    .out_valid(ev_irq), .out_tm(unused_tm), .blocked(unused_blk)
  );

  // Flow watchdog.
  logic [$clog2(FLOW_TIMEOUT+1)-1:0] idle_cnt;
  logic flow_armed, flow_break;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_cnt <= '0; flow_armed <= 1'b0; flow_break <= 1'b0;
    end else begin
      flow_break <= 1'b0;
      if (d_valid || d_clk) begin
        idle_cnt   <= '0;
        flow_armed <= 1'b1;
      end else if (flow_armed) begin
        if (idle_cnt == ($bits(idle_cnt))'(FLOW_TIMEOUT)) begin
          flow_break <= 1'b1;
          flow_armed <= 1'b0;     // one report per break
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end
    end
  end

  // IRQ flag, message registers and status.
  logic msg_err, cause;
  assign msg_err = d_valid && !d_ok;
  assign cause   = ev_irq || msg_err || d_frame_err || flow_break;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq <= 1'b0; cw <= '0; dw <= '0; status <= '0;
    end else if (irq_ack) begin
      irq    <= 1'b0;
      status <= '0;
    end else begin
      if (cause) begin
        irq <= 1'b1;
        if (irq) status[6] <= 1'b1;
      end
      if (d_valid && (ev_irq || msg_err) && !irq) begin
        cw <= d_tm.cw;
        dw <= d_tm.dw;
      end
      if (d_valid && d_cw_perr)  status[0] <= 1'b1;
      if (d_valid && d_dw_perr)  status[1] <= 1'b1;
      if (d_valid && d_code_err) status[2] <= 1'b1;
      if (d_frame_err)           status[3] <= 1'b1;
      if (flow_break)            status[4] <= 1'b1;
      if (ev_irq)                status[5] <= 1'b1;
    end
  end

endmodule
