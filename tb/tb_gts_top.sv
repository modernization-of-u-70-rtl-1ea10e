// tb_gts_top: end-to-end test of the whole timing system at its default
// sizes (three generators in a ring, two receivers and one registering
// device per local bus, one registering device per ring input, the
// archiving device on bus 0, 12 MHz clock, 10 kHz ticks, 1 Mbit/s lines).
//
// Event plan: generator 0 owns the programmed cycle (codes 0x01 start,
// 0x21..0x24 events, 0xFF end, zero = bare clock pulse); generators 1 and 2
// own local channels with codes 0x40+ch and 0x60+ch. Every event is global:
// the owner sends it on the ring, the others deliver it to their local bus
// and forward it, and the owner closes its global gates for its own codes
// so the message stops after one turn.
//
// One complete operation: programming of all masks and RAMs, one
// programmed accelerator cycle (all three 10 kHz clocks started together)
// with local events injected on generators 1 and 2, servicing of receiver
// interrupts, read-out of the three bus-end registering devices and of the
// three on the ring inputs after the end-of-cycle interrupt, then the
// flow-break alarm after the 10 kHz clock stops and a FIFO overflow, with
// their alarm LEDs, and finally the archiving device's records of local
// bus 0 in its FLASH. Each mechanism is counted and a mechanism that
// never happened is a failure. The archiving device's chips are the
// testbench models; only the RTC model's second is shortened.
module tb_gts_top;
  import gts_pkg::*;

  localparam int NT = 3, NR = 2, NL = 8, DIV = 1200, HB = 6, LEN = 20;

  logic clk = 0, rst_n = 1;
  cfg_t cfg [NT];
  logic [NT-1:0][NL-1:0] local_pulse = '0;
  logic [NT-1:0] cycle_start = '0, cycle_stop = '0, clr_ovf = '0;
  logic [NT-1:0] tick, running, gtn_rx_err, local_lost;
  logic [NT-1:0][5:0] fifo_ovf;
  mil_line_t gtn_line [NT];
  mil_line_t ltn_line [NT];
  logic [NT*NR-1:0] tmr_mask_we = '0, tmr_mask_bit = '0, tmr_irq_ack = '0;
  event_t tmr_mask_addr [NT*NR];
  logic [NT*NR-1:0][N_EVENTS-1:0] tmr_pulse;
  logic [NT*NR-1:0] tmr_clk_pulse, tmr_irq;
  word_t tmr_cw [NT*NR];
  word_t tmr_dw [NT*NR];
  logic [NT*NR-1:0][6:0] tmr_status;
  logic time_mark = 0;
  logic [NT-1:0] reg_rst = '0, reg_ld_addr = '0, reg_rd = '0, reg_irq_ack = '0;
  logic [NT-1:0][7:0] reg_ld_val = '0;
  word_t reg_rd_code [NT];
  logic [NT-1:0][15:0] reg_rd_time;
  logic [NT-1:0][7:0] reg_addr;
  logic [NT-1:0][2:0] reg_status;
  logic [NT-1:0] reg_irq;
  logic [NT-1:0] greg_rst = '0, greg_ld_addr = '0, greg_rd = '0, greg_irq_ack = '0;
  logic [NT-1:0][7:0] greg_ld_val = '0;
  word_t greg_rd_code [NT];
  logic [NT-1:0][15:0] greg_rd_time;
  logic [NT-1:0][7:0] greg_addr;
  logic [NT-1:0][2:0] greg_status;
  logic [NT-1:0] greg_irq;
  logic arch_rxd = 1, arch_txd;
  logic arch_fl_req, arch_fl_ack, arch_fr_req, arch_fr_we, arch_fr_ack;
  logic arch_rtc_req, arch_rtc_we, arch_rtc_ack, arch_buf_ovf, arch_rx_err, arch_wrapped;
  fl_op_e arch_fl_op;
  logic [20:0] arch_fl_addr;
  logic [11:0] arch_fr_addr;
  word_t arch_fl_wdata, arch_fl_rdata, arch_fr_wdata, arch_fr_rdata;
  logic [31:0] arch_rtc_wdata, arch_rtc_rdata, arch_wp;
  task_e arch_task;
  logic [NT-1:0][2:0] led_tmg;
  logic [NT*NR-1:0][1:0] led_tmr;
  int checks = 0, failures = 0;

  gts_top dut (.*);

  // Chips of the archiving device; the RTC second is shortened to 12000
  // clocks so that the 10-second flush happens within the test.
  tb_flash_model #(.AW(21), .SECTOR_AW(15), .LAT(3)) arch_flash (
    .clk, .req(arch_fl_req), .op(arch_fl_op), .addr(arch_fl_addr), .wdata(arch_fl_wdata),
    .rdata(arch_fl_rdata), .ack(arch_fl_ack));
  tb_fram_model #(.AW(12)) arch_fram (
    .clk, .req(arch_fr_req), .we(arch_fr_we), .addr(arch_fr_addr), .wdata(arch_fr_wdata),
    .rdata(arch_fr_rdata), .ack(arch_fr_ack));
  tb_rtc_model #(.SEC_CLKS(12000)) arch_rtc (
    .clk, .req(arch_rtc_req), .we(arch_rtc_we), .wdata(arch_rtc_wdata), .rdata(arch_rtc_rdata),
    .ack(arch_rtc_ack));
  tb_mil_monitor #(.HB(HB)) mon_l0 (.clk, .line(ltn_line[0]));

  tb_mil_monitor #(.HB(HB)) mon_g0 (.clk, .line(gtn_line[0]));
  tb_mil_monitor #(.HB(HB)) mon_g1 (.clk, .line(gtn_line[1]));
  tb_mil_monitor #(.HB(HB)) mon_g2 (.clk, .line(gtn_line[2]));

  // Arrival clock of an event on ring link l (output of generator l).
  function automatic longint t_on_line(int l, int code);
    if (l == 0) begin foreach (mon_g0.got[i]) if (mon_g0.got[i].cw[7:0] == code) return mon_g0.t_got[i]; end
    if (l == 1) begin foreach (mon_g1.got[i]) if (mon_g1.got[i].cw[7:0] == code) return mon_g1.t_got[i]; end
    if (l == 2) begin foreach (mon_g2.got[i]) if (mon_g2.got[i].cw[7:0] == code) return mon_g2.t_got[i]; end
    return 64'h7FFF_FFFF_FFFF_FFFF;
  endfunction

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 5 kHz time marks: one clock every 2400.
  int tm_div = 0;
  always @(posedge clk) begin
    #1;
    tm_div = (tm_div + 1) % 2400;
    time_mark = (tm_div == 0);
  end

  // Pulse counters per receiver and event, and mechanism counters.
  int pulses [NT*NR][256];
  longint t_first [NT*NR][256];
  longint cyc = 0;
  int n_ticks = 0, n_rx_err = 0;
  logic [NT*NR-1:0][N_EVENTS-1:0] tmr_pulse_d = '0;
  always @(posedge clk) begin
    for (int k = 0; k < NT*NR; k++)
      for (int e = 0; e < 256; e++)
        if (tmr_pulse[k][e] && !tmr_pulse_d[k][e]) begin
          if (pulses[k][e] == 0) t_first[k][e] = cyc;
          pulses[k][e]++;
        end
    cyc++;
    tmr_pulse_d = tmr_pulse;
    if (tick[0]) n_ticks++;
    if (|gtn_rx_err) n_rx_err++;
  end

  // Receiver IRQ service: read cw, note the event, acknowledge.
  int irq_events [NT*NR][256];
  int n_irq = 0, n_flow_break = 0;
  always @(posedge clk) begin
    for (int k = 0; k < NT*NR; k++) begin
      if (tmr_irq[k] && !tmr_irq_ack[k]) begin
        if (tmr_status[k][5]) irq_events[k][tmr_cw[k][7:0]]++;
        if (tmr_status[k][4]) n_flow_break++;
        n_irq++;
        tmr_irq_ack[k] <= 1'b1;
      end else begin
        tmr_irq_ack[k] <= 1'b0;
      end
    end
  end

  task automatic wr(int t, cfg_sel_e sel, int addr, int data);
    cfg[t] = '{we: 1'b1, sel: sel, addr: 20'(addr), data: 16'(data)};
    @(posedge clk); #1 cfg[t] = '0;
  endtask

  task automatic tmr_mask(int k, int e);
    tmr_mask_we[k] = 1; tmr_mask_addr[k] = 8'(e); tmr_mask_bit[k] = 1;
    @(posedge clk); #1 tmr_mask_we[k] = 0;
  endtask

  function automatic int owner(int e);
    if (e >= 8'h40 && e < 8'h48) return 1;
    if (e >= 8'h60 && e < 8'h68) return 2;
    return 0;
  endfunction

  function automatic int count_code(tm_t q [$], int code);
    int n = 0;
    foreach (q[i]) if (q[i].cw[7:0] == code) n++;
    return n;
  endfunction

  int events [$];
  word_t prg [LEN];

  initial begin
    foreach (cfg[t]) cfg[t] = '0;
    foreach (pulses[k, e]) pulses[k][e] = 0;
    foreach (irq_events[k, e]) irq_events[k][e] = 0;
    foreach (tmr_mask_addr[k]) tmr_mask_addr[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Event plan and masks.
    events = '{8'h01, 8'h21, 8'h22, 8'h23, 8'h24, 8'hFF,
               8'h40, 8'h41, 8'h42, 8'h43, 8'h60, 8'h61, 8'h62, 8'h63};
    for (int t = 0; t < NT; t++) begin
      foreach (events[i]) begin
        int e;
        e = events[i];
        if (owner(e) == t) begin
          if (t == 0) begin wr(t, SEL_MASK_PRG_LTN, e, 1); wr(t, SEL_MASK_PRG_GTN, e, 1); end
          else        begin wr(t, SEL_MASK_LOC_LTN, e, 1); wr(t, SEL_MASK_LOC_GTN, e, 1); end
        end else begin
          wr(t, SEL_MASK_GLB_LTN, e, 1);
          wr(t, SEL_MASK_GLB_GTN, e, 1);
        end
      end
      wr(t, SEL_OPDATA, 0, 16'h0100 * (t + 1) + 16'h07);
    end
    wr(0, SEL_MASK_PRG_LTN, 0, 1);     // bare clock pulses: local bus only
    for (int ch = 0; ch < 4; ch++) begin
      wr(1, SEL_RAM_LOC, ch, 16'h0040 + ch);
      wr(2, SEL_RAM_LOC, ch, 16'h0060 + ch);
    end
    for (int s = 0; s < LEN; s++) prg[s] = 16'h0000;
    prg[0] = 16'h0001; prg[3] = 16'h0021; prg[7] = 16'h0022; prg[8] = 16'h0023;
    prg[12] = 16'h0024; prg[LEN-1] = 16'h00FF;
    for (int s = 0; s < LEN; s++) wr(0, SEL_RAM_PRG, s, prg[s]);
    for (int t = 0; t < NT; t++) wr(t, SEL_CYCLE_LEN, LEN, 0);
    // Generators 1 and 2 run their own 10 kHz clock (bare clock pulses).
    for (int t = 1; t < NT; t++) begin
      wr(t, SEL_MASK_PRG_LTN, 0, 1);
      for (int s = 0; s < LEN; s++) wr(t, SEL_RAM_PRG, s, 0);
    end
    // Receivers: first receiver of each bus interrupts on all events but
    // the bare clock, the second only on the programmed 0x22.
    for (int k = 0; k < NT*NR; k++) begin
      if (k % NR == 0) foreach (events[i]) tmr_mask(k, events[i]);
      else tmr_mask(k, 8'h22);
    end

    // One accelerator cycle.
    cycle_start = '1; @(posedge clk); #1 cycle_start = '0;
    repeat (5 * DIV) @(posedge clk); #1;
    for (int ch = 0; ch < 4; ch++) begin
      local_pulse[1][ch] = 1; local_pulse[2][ch] = 1;
      repeat (4) @(posedge clk); #1;
      local_pulse = '0;
      repeat (3 * DIV) @(posedge clk); #1;
    end
    wait (running == 0);
    repeat (3 * DIV) @(posedge clk); #1;

    // Every event reached every receiver exactly once.
    check(n_ticks == LEN, $sformatf("%0d ticks in a cycle of %0d", n_ticks, LEN));
    for (int k = 0; k < NT*NR; k++) begin
      foreach (events[i]) check(pulses[k][events[i]] == 1,
        $sformatf("receiver %0d: event %h pulsed %0d times", k, events[i], pulses[k][events[i]]));
    end
    for (int t = 0; t < NT; t++)
      check(pulses[t*NR][0] == (t == 0 ? LEN - 6 : LEN), $sformatf("bus %0d: %0d bare clock pulses", t, pulses[t*NR][0]));
    for (int k = 0; k < NT*NR; k++) begin
      if (k % NR == 0) foreach (events[i]) check(irq_events[k][events[i]] == 1, $sformatf("receiver %0d IRQ for %h", k, events[i]));
      else check(irq_events[k][8'h22] == 1 && irq_events[k][8'h21] == 0, $sformatf("receiver %0d masked IRQs", k));
    end
    // Ring direction: generator i sends to generator i+1, so an event
    // is forwarded by the next generator before the one after it.
    foreach (events[i]) begin
      int o;
      o = owner(events[i]);
      check(t_on_line((o + 1) % NT, events[i]) < t_on_line((o + 2) % NT, events[i]),
            $sformatf("event %h forwarded in ring order", events[i]));
    end
    // Ring: each event crosses each link once and stops at its owner.
    foreach (events[i]) begin
      check(count_code(mon_g0.got, events[i]) == 1 && count_code(mon_g2.got, events[i]) == 1,
            $sformatf("event %h crossed the ring once", events[i]));
    end

    // Registering devices: end-of-cycle IRQ, then read out.
    for (int t = 0; t < NT; t++) begin
      int n_rec;
      logic [7:0] a_end;
      check(reg_irq[t] && reg_status[t] == 0, $sformatf("registrar %0d end-of-cycle IRQ, status %b", t, reg_status[t]));
      a_end = reg_addr[t];
      n_rec = int'(a_end) / 2;
      check(n_rec == events.size(), $sformatf("registrar %0d recorded %0d messages", t, n_rec));
      reg_ld_val[t] = '0; reg_ld_addr[t] = 1; @(posedge clk); #1 reg_ld_addr[t] = 0;
      begin
        int found, last_time;
        bit mono;
        word_t cw_prev;
        found = 0; last_time = 0; mono = 1; cw_prev = '0;
        for (int a = 0; a < a_end; a++) begin
          reg_rd[t] = 1; @(posedge clk); #1 reg_rd[t] = 0;
          if (a % 2 == 0) begin
            cw_prev = reg_rd_code[t];
            foreach (events[i]) if (reg_rd_code[t][7:0] == events[i]) found++;
            if (int'(reg_rd_time[t]) < last_time) mono = 0;
            last_time = int'(reg_rd_time[t]);
          end else begin
            check(reg_rd_code[t] == 16'h0100 * (owner(int'(cw_prev[7:0])) + 1) + 16'h07,
                  $sformatf("registrar %0d data word %h", t, reg_rd_code[t]));
          end
        end
        check(found == events.size(), $sformatf("registrar %0d found %0d events", t, found));
        check(mono, "time positions never decrease");
        check(last_time > 0, "time marks counted");
      end
      reg_irq_ack[t] = 1; @(posedge clk); #1 reg_irq_ack[t] = 0;
      reg_rst[t] = 1; @(posedge clk); #1 reg_rst[t] = 0;
    end

    // Registering devices in the generators: every global event arrived
    // once on each ring input, in time order, and the end event closed
    // the cycle.
    for (int t = 0; t < NT; t++) begin
      int n_rec, found, last_time;
      bit mono;
      n_rec = int'(greg_addr[t]) / 2;
      check(greg_irq[t] && greg_status[t] == 0, $sformatf("generator %0d registrar IRQ, status %b", t, greg_status[t]));
      check(n_rec == events.size(), $sformatf("generator %0d registrar recorded %0d ring messages", t, n_rec));
      greg_ld_val[t] = '0; greg_ld_addr[t] = 1; @(posedge clk); #1 greg_ld_addr[t] = 0;
      found = 0; last_time = 0; mono = 1;
      for (int a = 0; a < 2 * n_rec; a++) begin
        greg_rd[t] = 1; @(posedge clk); #1 greg_rd[t] = 0;
        if (a % 2 == 0) begin
          foreach (events[i]) if (greg_rd_code[t][7:0] == events[i]) found++;
          if (int'(greg_rd_time[t]) < last_time) mono = 0;
          last_time = int'(greg_rd_time[t]);
        end
      end
      check(found == events.size() && mono, $sformatf("generator %0d registrar: %0d events, time order %0d", t, found, mono));
      greg_irq_ack[t] = 1; @(posedge clk); #1 greg_irq_ack[t] = 0;
      greg_rst[t] = 1; @(posedge clk); #1 greg_rst[t] = 0;
    end

    // Flow break: the 10 kHz flow stopped at the end of the cycle.
    repeat (2 * DIV) @(posedge clk); #1;
    check(n_flow_break == NT * NR, $sformatf("flow break reported %0d times", n_flow_break));
    for (int k = 0; k < NT*NR; k++) check(led_tmr[k] == 2'b10, $sformatf("receiver %0d LEDs %b: flow break lit", k, led_tmr[k]));

    // FIFO overflow on generator 2.
    for (int r = 0; r < 6; r++) begin
      local_pulse[2] = 8'h0F; repeat (8) @(posedge clk); #1;
      local_pulse[2] = '0; repeat (8) @(posedge clk); #1;
    end
    check(fifo_ovf[2][2*0] || fifo_ovf[2][2*0+1], $sformatf("generator 2 local FIFO overflow %b", fifo_ovf[2]));
    check(n_rx_err == 0, "no corrupted global messages");
    check(led_tmg[2][0] && !led_tmg[2][1], $sformatf("generator 2 LEDs %b: FIFO overflow lit", led_tmg[2]));

    // Archiving device on local bus 0: after the next periodic flush every
    // message with a non-zero event code is in the FLASH, in order.
    repeat (11 * 12000 + 5000) @(posedge clk); #1;
    begin
      tm_t arch_exp [$];
      int n_ok;
      foreach (mon_l0.got[i]) if (mon_l0.got[i].cw[7:0] != 0) arch_exp.push_back(mon_l0.got[i]);
      check(arch_exp.size() > 10 && arch_wp == 32'(arch_exp.size()),
            $sformatf("archived %0d messages, %0d on the bus", arch_wp, arch_exp.size()));
      n_ok = 0;
      foreach (arch_exp[i])
        if (arch_flash.mem[5*i+3] == arch_exp[i].cw && arch_flash.mem[5*i+4] == arch_exp[i].dw &&
            {arch_flash.mem[5*i], arch_flash.mem[5*i+1]} >= 32'd1000) n_ok++;
      check(n_ok == arch_exp.size(), $sformatf("%0d of %0d archived records match", n_ok, arch_exp.size()));
      check({arch_fram.mem[0], arch_fram.mem[1]} == arch_wp, "archive pointer kept in the FRAM");
      check(!arch_buf_ovf && arch_task == TASK_ARCHIVE && mon_l0.bad == 0, "archiving without loss");
    end

    $display("mechanisms: ticks=%0d irq=%0d flow_break=%0d fifo_ovf=%b archived=%0d",
             n_ticks, n_irq, n_flow_break, fifo_ovf[2], arch_wp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
