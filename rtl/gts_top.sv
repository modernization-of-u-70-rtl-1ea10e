// gts_top: the General Timing System of an accelerator complex.
//
// N_TMG timing message generators (tmg), one per large installation, are
// linked into a one-way global ring: the GTN output of generator i drives
// the GTN input of generator i+1, the last one closes the ring. Each
// generator drives its own local timing network (LTN), a one-way multidrop
// bus read by N_TMR timing message receivers (tmr) and, at the end of the
// bus, by a registering device (tm_registrar) with its own Manchester-II
// decoder. A second registering device in each generator records the
// global messages arriving on its ring input (ports greg_*). The
// registering devices start their time count on the message with event
// code START_EVENT and end the cycle on END_EVENT.
//
// All ports of the host computers (equipment controller SBCs) are brought
// out: per generator a cfg write port and start/stop of the 10 kHz clock;
// per receiver the mask write port, irq_ack and the outputs; per
// registering device its read-out port. time_mark is the common 5 kHz time
// mark input of the registering devices. A portable TM archiving device
// (tm_archiver) listens on local bus 0; its serial port and the FLASH, FRAM
// and RTC chip ports are brought out. The alarms of the generators
// (FIFO overflow, ring reception error, lost local pulse) and receivers
// (flow break, message error) light front-panel LEDs (alarm_led). All
// blocks run from one clock (12 MHz by default).
//
// The ring of three generators, the local radial buses and the placement of
// a registering device at the end of each local bus and in each
// generator, and the alarm LEDs follow the document; watching the ring
// input with the generator's device is this design's reading;
// two receivers per bus (as drawn), the start/end event codes and the
// place of the archiving device are this design's choices.
module gts_top
  import gts_pkg::*;
#(
  parameter int unsigned N_TMG       = 3,
  parameter int unsigned N_TMR       = 2,
  parameter int unsigned N_LOCAL     = 8,
  parameter int unsigned PROG_AW     = 17,
  parameter int unsigned TICK_DIV    = 1200,
  parameter int unsigned HALF_BIT    = 6,
  parameter int unsigned GAP_BITS    = 4,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned PULSE_CYC   = 12,
  parameter int unsigned FLOW_TIMEOUT = 1800,
  parameter int unsigned REG_ADDR_W  = 8,
  parameter int unsigned START_EVENT = 1,
  parameter int unsigned END_EVENT   = 255,
  parameter int unsigned ARCH_BAUD_DIV  = 104,
  parameter int unsigned ARCH_FLASH_AW  = 21,
  parameter int unsigned ARCH_SECTOR_AW = 15,
  parameter int unsigned ARCH_FRAM_AW   = 12,
  parameter int unsigned ARCH_BUF_DEPTH = 256,
  parameter int unsigned ARCH_FLUSH_SEC = 10,
  parameter int unsigned LED_HOLD       = 1_200_000
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // generators
  input  cfg_t                                cfg         [N_TMG],
  input  logic [N_TMG-1:0][N_LOCAL-1:0]       local_pulse,
  input  logic [N_TMG-1:0]                    cycle_start,
  input  logic [N_TMG-1:0]                    cycle_stop,
  output logic [N_TMG-1:0]                    tick,
  output logic [N_TMG-1:0]                    running,
  output logic [N_TMG-1:0][5:0]               fifo_ovf,
  input  logic [N_TMG-1:0]                    clr_ovf,
  output logic [N_TMG-1:0]                    gtn_rx_err,
  output logic [N_TMG-1:0]                    local_lost,
  output mil_line_t                           gtn_line    [N_TMG],
  output mil_line_t                           ltn_line    [N_TMG],
  // receivers, index = generator * N_TMR + receiver
  input  logic [N_TMG*N_TMR-1:0]              tmr_mask_we,
  input  event_t                              tmr_mask_addr [N_TMG*N_TMR],
  input  logic [N_TMG*N_TMR-1:0]              tmr_mask_bit,
  input  logic [N_TMG*N_TMR-1:0]              tmr_irq_ack,
  output logic [N_TMG*N_TMR-1:0][N_EVENTS-1:0] tmr_pulse,
  output logic [N_TMG*N_TMR-1:0]              tmr_clk_pulse,
  output word_t                               tmr_cw      [N_TMG*N_TMR],
  output word_t                               tmr_dw      [N_TMG*N_TMR],
  output logic [N_TMG*N_TMR-1:0]              tmr_irq,
  output logic [N_TMG*N_TMR-1:0][6:0]         tmr_status,
  // registering devices, one per local bus
  input  logic                                time_mark,
  input  logic [N_TMG-1:0]                    reg_rst,
  input  logic [N_TMG-1:0]                    reg_ld_addr,
  input  logic [N_TMG-1:0][REG_ADDR_W-1:0]    reg_ld_val,
  input  logic [N_TMG-1:0]                    reg_rd,
  output word_t                               reg_rd_code [N_TMG],
  output logic [N_TMG-1:0][15:0]              reg_rd_time,
  output logic [N_TMG-1:0][REG_ADDR_W-1:0]    reg_addr,
  output logic [N_TMG-1:0][2:0]               reg_status,
  output logic [N_TMG-1:0]                    reg_irq,
  input  logic [N_TMG-1:0]                    reg_irq_ack,
  // registering devices built into the generators, on their ring inputs
  input  logic [N_TMG-1:0]                    greg_rst,
  input  logic [N_TMG-1:0]                    greg_ld_addr,
  input  logic [N_TMG-1:0][REG_ADDR_W-1:0]    greg_ld_val,
  input  logic [N_TMG-1:0]                    greg_rd,
  output word_t                               greg_rd_code [N_TMG],
  output logic [N_TMG-1:0][15:0]              greg_rd_time,
  output logic [N_TMG-1:0][REG_ADDR_W-1:0]    greg_addr,
  output logic [N_TMG-1:0][2:0]               greg_status,
  output logic [N_TMG-1:0]                    greg_irq,
  input  logic [N_TMG-1:0]                    greg_irq_ack,
  // archiving device on local bus 0, with its chips outside
  input  logic                                arch_rxd,
  output logic                                arch_txd,
  output logic                                arch_fl_req,
  output fl_op_e                              arch_fl_op,
  output logic [ARCH_FLASH_AW-1:0]            arch_fl_addr,
  output word_t                               arch_fl_wdata,
  input  word_t                               arch_fl_rdata,
  input  logic                                arch_fl_ack,
  output logic                                arch_fr_req,
  output logic                                arch_fr_we,
  output logic [ARCH_FRAM_AW-1:0]             arch_fr_addr,
  output word_t                               arch_fr_wdata,
  input  word_t                               arch_fr_rdata,
  input  logic                                arch_fr_ack,
  output logic                                arch_rtc_req,
  output logic                                arch_rtc_we,
  output logic [31:0]                         arch_rtc_wdata,
  input  logic [31:0]                         arch_rtc_rdata,
  input  logic                                arch_rtc_ack,
  output task_e                               arch_task,
  output logic                                arch_buf_ovf,
  output logic                                arch_rx_err,
  output logic [31:0]                         arch_wp,
  output logic                                arch_wrapped,
  // front-panel alarm LEDs
  output logic [N_TMG-1:0][2:0]               led_tmg,    // {local lost, ring error, FIFO overflow}
  output logic [N_TMG*N_TMR-1:0][1:0]         led_tmr     // {flow break, message error}
);

  for (genvar i = 0; i < N_TMG; i++) begin : g_inst
    tmg #(
      .N_LOCAL(N_LOCAL), .PROG_AW(PROG_AW), .TICK_DIV(TICK_DIV),
      .HALF_BIT(HALF_BIT), .GAP_BITS(GAP_BITS), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_tmg (
      .clk, .rst_n,
      .cfg        (cfg[i]),
      .local_pulse(local_pulse[i]),
      .cycle_start(cycle_start[i]),
      .cycle_stop (cycle_stop[i]),
      .gtn_in     (gtn_line[(i + N_TMG - 1) % N_TMG]),
      .gtn_out    (gtn_line[i]),
      .ltn_out    (ltn_line[i]),
      .tick       (tick[i]),
      .running    (running[i]),
      .fifo_ovf   (fifo_ovf[i]),
      .clr_ovf    (clr_ovf[i]),
      .gtn_rx_err (gtn_rx_err[i]),
      .local_lost (local_lost[i])
    );

    for (genvar r = 0; r < N_TMR; r++) begin : g_tmr
      localparam int unsigned K = i * N_TMR + r;
      tmr #(
        .HALF_BIT(HALF_BIT), .PULSE_CYC(PULSE_CYC), .FLOW_TIMEOUT(FLOW_TIMEOUT)
      ) u_tmr (
        .clk, .rst_n,
        .ltn          (ltn_line[i]),
        .mask_we      (tmr_mask_we[K]),
        .mask_addr    (tmr_mask_addr[K]),
        .mask_bit     (tmr_mask_bit[K]),
        .irq_ack      (tmr_irq_ack[K]),
        .pulse_out    (tmr_pulse[K]),
        .clk_pulse_out(tmr_clk_pulse[K]),
        .cw           (tmr_cw[K]),
        .dw           (tmr_dw[K]),
        .irq          (tmr_irq[K]),
        .status       (tmr_status[K])
      );
    end

    // Registering device at the end of the local bus.
    logic   d_clk, d_valid, d_ok, d_cwp, d_dwp, d_cerr, d_ferr;
    event_t d_event;
    tm_t    d_tm;
    logic   st0;

    mil_decoder #(.HALF_BIT(HALF_BIT)) u_rdec (
      .clk, .rst_n, .line(ltn_line[i]),
      .clk_pulse(d_clk), .cw_event(d_event),
      .tm_valid(d_valid), .tm(d_tm), .tm_ok(d_ok),
      .cw_perr(d_cwp), .dw_perr(d_dwp), .code_err(d_cerr), .frame_err(d_ferr)
    );
    assign st0 = d_valid && d_ok;

    logic [REG_ADDR_W-1:0] unused_addr_view;
    logic [15:0]           unused_time;

    tm_registrar #(.ADDR_W(REG_ADDR_W), .TIME_W(16)) u_reg (
      .clk, .rst_n,
      .st0,
      .tm       (d_tm),
      .time_mark,
      .str      (st0 && event_of(d_tm) == event_t'(START_EVENT)),
      .rst      (reg_rst[i]),
      .cycle_end(st0 && event_of(d_tm) == event_t'(END_EVENT)),
      .ld_addr  (reg_ld_addr[i]),
      .ld_val   (reg_ld_val[i]),
      .rd       (reg_rd[i]),
      .rd_code  (reg_rd_code[i]),
      .rd_time  (reg_rd_time[i]),
      .addr     (reg_addr[i]),
      .time_cnt (unused_time),
      .status   (reg_status[i]),
      .irq      (reg_irq[i]),
      .irq_ack  (reg_irq_ack[i])
    );

    // Registering device built into the generator, watching the global
    // messages on its ring input.
    logic   g_clk, g_valid, g_ok, g_cwp, g_dwp, g_cerr, g_ferr;
    event_t g_event;
    tm_t    g_tm;
    logic   gst0;
    logic [15:0] unused_gtime;

    mil_decoder #(.HALF_BIT(HALF_BIT)) u_gdec (
      .clk, .rst_n, .line(gtn_line[(i + N_TMG - 1) % N_TMG]),
      .clk_pulse(g_clk), .cw_event(g_event),
      .tm_valid(g_valid), .tm(g_tm), .tm_ok(g_ok),
      .cw_perr(g_cwp), .dw_perr(g_dwp), .code_err(g_cerr), .frame_err(g_ferr)
    );
    assign gst0 = g_valid && g_ok;

    tm_registrar #(.ADDR_W(REG_ADDR_W), .TIME_W(16)) u_greg (
      .clk, .rst_n,
      .st0      (gst0),
      .tm       (g_tm),
      .time_mark,
      .str      (gst0 && event_of(g_tm) == event_t'(START_EVENT)),
      .rst      (greg_rst[i]),
      .cycle_end(gst0 && event_of(g_tm) == event_t'(END_EVENT)),
      .ld_addr  (greg_ld_addr[i]),
      .ld_val   (greg_ld_val[i]),
      .rd       (greg_rd[i]),
      .rd_code  (greg_rd_code[i]),
      .rd_time  (greg_rd_time[i]),
      .addr     (greg_addr[i]),
      .time_cnt (unused_gtime),
      .status   (greg_status[i]),
      .irq      (greg_irq[i]),
      .irq_ack  (greg_irq_ack[i])
    );
  end

  // Portable archiving device plugged onto local bus 0.
  tm_archiver #(
    .HALF_BIT(HALF_BIT), .BAUD_DIV(ARCH_BAUD_DIV), .FLASH_AW(ARCH_FLASH_AW),
    .SECTOR_AW(ARCH_SECTOR_AW), .FRAM_AW(ARCH_FRAM_AW), .BUF_DEPTH(ARCH_BUF_DEPTH),
    .SUB_DIV(TICK_DIV), .POLL_DIV(10 * TICK_DIV), .FLUSH_SEC(ARCH_FLUSH_SEC)
  ) u_arch (
    .clk, .rst_n,
    .ltn      (ltn_line[0]),
    .rxd      (arch_rxd),
    .txd      (arch_txd),
    .fl_req   (arch_fl_req),   .fl_op   (arch_fl_op),   .fl_addr (arch_fl_addr),
    .fl_wdata (arch_fl_wdata), .fl_rdata(arch_fl_rdata), .fl_ack  (arch_fl_ack),
    .fr_req   (arch_fr_req),   .fr_we   (arch_fr_we),   .fr_addr (arch_fr_addr),
    .fr_wdata (arch_fr_wdata), .fr_rdata(arch_fr_rdata), .fr_ack  (arch_fr_ack),
    .rtc_req  (arch_rtc_req),  .rtc_we  (arch_rtc_we),  .rtc_wdata(arch_rtc_wdata),
    .rtc_rdata(arch_rtc_rdata), .rtc_ack (arch_rtc_ack),
    .task_code(arch_task),
    .buf_ovf  (arch_buf_ovf),
    .rx_err   (arch_rx_err),
    .wp       (arch_wp),
    .wrapped  (arch_wrapped)
  );

  // Front-panel LEDs for the real-time alarms.
  logic [N_TMG-1:0][2:0]       alarm_tmg;
  logic [N_TMG*N_TMR-1:0][1:0] alarm_tmr;
  for (genvar i = 0; i < N_TMG; i++) begin : g_alarm_tmg
    assign alarm_tmg[i] = {local_lost[i], gtn_rx_err[i], |fifo_ovf[i]};
  end
  for (genvar k = 0; k < N_TMG * N_TMR; k++) begin : g_alarm_tmr
    assign alarm_tmr[k] = {tmr_status[k][4], |tmr_status[k][3:0]};
  end
  alarm_led #(.N(3 * N_TMG), .HOLD(LED_HOLD)) u_led_tmg (
    .clk, .rst_n, .alarm(alarm_tmg), .led(led_tmg)
  );
  alarm_led #(.N(2 * N_TMG * N_TMR), .HOLD(LED_HOLD)) u_led_tmr (
    .clk, .rst_n, .alarm(alarm_tmr), .led(led_tmr)
  );

endmodule
