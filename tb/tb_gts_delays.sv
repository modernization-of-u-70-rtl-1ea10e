// tb_gts_delays: measures the transport delays of the timing system at its
// default sizes (12 MHz clock, 1 Mbit/s lines, 10 kHz ticks).
//
// A generator delays an event by the time it takes to read the code, pass
// the mask and FIFO and start the encoder; a ring hop adds one complete
// message reception, because a message is forwarded only after its Data
// Word has been received and checked; a receiver gives its pulse at the
// end of the Command Word and its IRQ at the end of the Data Word. This
// testbench measures, in clocks, with only the event under test on each
// line:
//   programmed: 10 kHz tick of generator 0 -> start of the message on its
//               local bus (expected under 1 us);
//   local:      local pulse on generator 1 -> start on its local bus
//               (expected under 1 us);
//   global:     the same pulse -> start on generator 2's local bus, after
//               one hop of the ring (expected local + 80 half-bits + at
//               most 4 half-bits of decoding and forwarding);
//   receiver:   start of a message on bus 1 -> pulse output (Command Word
//               length + at most one half-bit) and -> IRQ (one more word).
// It prints the measured values beside the delays quoted for the original
// hardware (13.8, 6.5, 52.8, 27.2 and 45.2 us), which include chip
// latencies not modelled here; the checks are against this design's own
// expectations, worked out from the line protocol above.
module tb_gts_delays;
  import gts_pkg::*;

  localparam int NT = 3, NR = 2, NL = 8;  // default sizes of the top
  localparam int HB = 6, W = 40 * HB;    // clocks per half-bit and per word

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

  // The archiving device's chips are absent: requests are never answered.
  assign arch_fl_rdata = '0;
  assign arch_fl_ack   = 1'b0;
  assign arch_fr_rdata = '0;
  assign arch_fr_ack   = 1'b0;
  assign arch_rtc_rdata = '0;
  assign arch_rtc_ack  = 1'b0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int t, cfg_sel_e sel, int addr, int data);
    cfg[t] = '{we: 1'b1, sel: sel, addr: 20'(addr), data: 16'(data)};
    @(posedge clk); #1 cfg[t] = '0;
  endtask

  // Time stamps.
  longint cyc = 0, t_tick0 = 0, t_prg_tick = 0, t_ltn [3], t_pulse = -1, t_irq = -1;
  logic [2:0] act_d = '0;
  logic [NT-1:0][NL-1:0] lp_d = '0;
  longint t_local = -1;
  always @(posedge clk) begin
    cyc++;
    if (tick[0]) t_tick0 = cyc;
    for (int l = 0; l < 3; l++)
      if (ltn_line[l].act && !act_d[l] && t_ltn[l] < 0) begin
        t_ltn[l] = cyc;
        if (l == 0) t_prg_tick = t_tick0;
      end
    act_d = {ltn_line[2].act, ltn_line[1].act, ltn_line[0].act};
    if (local_pulse[1][0] && !lp_d[1][0]) t_local = cyc;
    lp_d = local_pulse;
    if (tmr_pulse[2][8'h40] && t_pulse < 0) t_pulse = cyc;
    // receiver 2 (bus 1): note the event IRQ, acknowledge every IRQ
    tmr_irq_ack <= '0;
    for (int k = 0; k < NT*NR; k++)
      if (tmr_irq[k] && !tmr_irq_ack[k]) begin
        if (k == 2 && tmr_status[k][5] && t_irq < 0) t_irq = cyc;
        tmr_irq_ack[k] <= 1'b1;
      end
  end

  initial begin
    int d_prg, d_loc, d_glb, d_pul, d_irq;
    foreach (cfg[t]) cfg[t] = '0;
    foreach (tmr_mask_addr[k]) tmr_mask_addr[k] = '0;
    foreach (t_ltn[l]) t_ltn[l] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Generator 0: programmed event 0x21 in slot 2 of a 4-slot cycle, to
    // its local bus only (bare clock slots closed).
    wr(0, SEL_MASK_PRG_LTN, 8'h21, 1);
    for (int s = 0; s < 4; s++) wr(0, SEL_RAM_PRG, s, s == 2 ? 16'h0021 : 16'h0000);
    wr(0, SEL_CYCLE_LEN, 4, 0);
    // Generator 1: local channel 0 = event 0x40 to its bus and the ring;
    // generator 2 delivers it to its bus.
    wr(1, SEL_RAM_LOC, 0, 16'h0040);
    wr(1, SEL_MASK_LOC_LTN, 8'h40, 1);
    wr(1, SEL_MASK_LOC_GTN, 8'h40, 1);
    wr(2, SEL_MASK_GLB_LTN, 8'h40, 1);
    // Receiver 2 (first on bus 1) interrupts on 0x40.
    tmr_mask_we[2] = 1; tmr_mask_addr[2] = 8'h40; tmr_mask_bit[2] = 1;
    @(posedge clk); #1 tmr_mask_we[2] = 0;

    cycle_start[0] = 1; @(posedge clk); #1 cycle_start[0] = 0;
    wait (running[0] == 0);
    repeat (100) @(posedge clk); #1;
    d_prg = int'(t_ltn[0] - t_prg_tick);

    local_pulse[1][0] = 1; repeat (4) @(posedge clk); #1 local_pulse[1][0] = 0;
    repeat (4 * W) @(posedge clk); #1;
    d_loc = int'(t_ltn[1] - t_local);
    d_glb = int'(t_ltn[2] - t_local);
    d_pul = int'(t_pulse - t_ltn[1]);
    d_irq = int'(t_irq - t_ltn[1]);

    $display("delays at 12 MHz (this design / quoted for the original hardware):");
    $display("  programmed event  %0d clocks = %0.2f us / 13.8 us", d_prg, d_prg / 12.0);
    $display("  local event       %0d clocks = %0.2f us / 6.5 us", d_loc, d_loc / 12.0);
    $display("  global event      %0d clocks = %0.2f us / 52.8 us", d_glb, d_glb / 12.0);
    $display("  receiver pulse    %0d clocks = %0.2f us / 27.2 us", d_pul, d_pul / 12.0);
    $display("  receiver IRQ      %0d clocks = %0.2f us / 45.2 us", d_irq, d_irq / 12.0);

    check(t_ltn[0] > 0 && d_prg > 0 && d_prg < 12, $sformatf("programmed delay %0d clocks", d_prg));
    check(t_ltn[1] > 0 && d_loc > 0 && d_loc < 12, $sformatf("local delay %0d clocks", d_loc));
    check(t_ltn[2] > 0 && d_glb - d_loc >= 2 * W && d_glb - d_loc <= 2 * W + 4 * HB,
          $sformatf("ring hop adds %0d clocks, expected %0d..%0d", d_glb - d_loc, 2 * W, 2 * W + 4 * HB));
    check(t_pulse > 0 && d_pul >= W && d_pul <= W + HB, $sformatf("pulse %0d clocks after message start", d_pul));
    check(t_irq > 0 && d_irq - d_pul == W, $sformatf("IRQ %0d clocks after the pulse", d_irq - d_pul));
    check(d_glb > d_prg && d_glb > d_loc && d_irq > d_pul, "global events slowest, IRQ after the pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
