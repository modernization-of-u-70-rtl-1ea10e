// tb_tmr: checks the timing message receiver.
//
// Sends messages at the regular 10 kHz rate (1200 clocks at 12 MHz) on a
// line driven from the reference patterns of tb_util_pkg, with random event
// codes and a random mask. Checks:
//   - pulse_out: exactly the event's output goes high, for PULSE_CYC
//     clocks, within one half-bit after the end of the Command Word;
//   - IRQ: set only for open events, 40 half-bits (one 20 us word) after
//     the pulse; cw/dw hold the message that raised it until irq_ack; a
//     second cause before the acknowledge sets status.missed;
//   - a parity error in either word raises IRQ with its status bit;
//   - a pause in the flow longer than FLOW_TIMEOUT raises IRQ with
//     status.flow_break, and regular traffic never does.
module tb_tmr;
  import gts_pkg::*;
  import tb_util_pkg::*;

  localparam int HB = 6, PW = 12, TO = 1800, PERIOD = 1200;

  logic clk = 0, rst_n = 1;
  mil_line_t ltn = '{act: 1'b0, lvl: 1'b0};
  logic mask_we = 0, mask_bit = 0, irq_ack = 0;
  event_t mask_addr = '0;
  logic [N_EVENTS-1:0] pulse_out;
  logic clk_pulse_out, irq;
  word_t cw, dw;
  logic [6:0] status;
  bit ref_mask [256];
  int checks = 0, failures = 0;

  tmr #(.HALF_BIT(HB), .PULSE_CYC(PW), .FLOW_TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulse monitor: start time, length and index of each output pulse.
  longint cyc = 0, t_rise, t_irq;
  int p_len = 0, p_idx = -1, n_rise = 0, n_bad_onehot = 0;
  logic irq_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (pulse_out != 0) begin
      if (!$onehot(pulse_out)) n_bad_onehot++;
      if (p_len == 0) begin t_rise = cyc; n_rise++; end
      p_len++;
      for (int i = 0; i < N_EVENTS; i++) if (pulse_out[i]) p_idx = i;
    end
    if (irq && !irq_d) t_irq = cyc;
    irq_d = irq;
  end

  longint t_cw_end;
  task automatic send_msg(logic [15:0] c, logic [15:0] d, bit bad_cw = 0, bit bad_dw = 0);
    logic [79:0] p;
    p = {ref_halfbits(c, 1, bad_cw), ref_halfbits(d, 0, bad_dw)};
    for (int h = 79; h >= 0; h--) begin
      ltn = '{act: 1'b1, lvl: p[h]};
      repeat (HB) @(posedge clk);
      #1;
      if (h == 40) t_cw_end = cyc;
    end
    ltn = '{act: 1'b0, lvl: 1'b0};
    p_len = 0;
    repeat (PERIOD - 80 * HB) @(posedge clk);
    #1;
  endtask

  task automatic ack();
    irq_ack = 1; @(posedge clk); #1 irq_ack = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 0; e < 256; e++) begin
      ref_mask[e] = ($urandom_range(0, 2) == 0);
      mask_we = 1; mask_addr = 8'(e); mask_bit = ref_mask[e];
      @(posedge clk); #1;
    end
    mask_we = 0;

    // Regular traffic.
    for (int n = 0; n < 60; n++) begin
      logic [15:0] c, d;
      int r0;
      c = 16'($urandom); d = 16'($urandom);
      r0 = n_rise;
      send_msg(c, d);
      check(n_rise == r0 + 1 && p_idx == int'(c[7:0]), $sformatf("msg %0d pulse on output %0d (got %0d)", n, c[7:0], p_idx));
      check(p_len == 0 || p_len == PW, "pulse width");
      check(t_rise > t_cw_end && t_rise <= t_cw_end + HB, $sformatf("msg %0d pulse %0d clocks after CW end", n, t_rise - t_cw_end));
      check(irq == ref_mask[c[7:0]], $sformatf("msg %0d irq for event %0d", n, c[7:0]));
      if (irq) begin
        check(t_irq - t_rise == 40 * HB, $sformatf("IRQ %0d clocks after pulse", t_irq - t_rise));
        check(cw == c && dw == d, "cw/dw registers");
        check(status[5] && status[4:0] == 0, $sformatf("status %b after event", status));
        // second message before the acknowledge: registers keep the first
        begin
          logic [15:0] c2;
          c2 = {8'h00, 8'(n)};
          while (!ref_mask[c2[7:0]]) c2++;
          send_msg(c2, 16'hBEEF);
          check(cw == c && dw == d, "registers held until acknowledge");
          check(status[6], "missed flag");
        end
        ack();
        check(!irq && status == 0, "acknowledge clears flag and status");
      end
    end
    check(n_bad_onehot == 0, "DMUX1 outputs one-hot");

    // Parity errors.
    send_msg(16'h0000, 16'h1111, 1, 0);
    check(irq && status[0] && !status[1], "CW parity error");
    ack();
    send_msg(16'h0000, 16'h1111, 0, 1);
    check(irq && status[1] && !status[0] && cw == 16'h0000 && dw == 16'h1111, "DW parity error");
    ack();

    // Flow break.
    check(!irq, "no IRQ before break");
    repeat (TO + 100) @(posedge clk);
    #1;
    check(irq && status[4], "flow break reported");
    ack();
    repeat (3 * TO) @(posedge clk);
    #1;
    check(!irq, "one report per break");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
