// tmg: timing message generator.
//
// Each large installation has one. It collects timing messages from three
// sources and distributes them to the global ring network (GTN) and to its
// local multidrop network (LTN):
//   - local:      tmg_local_src, event codes read by local pulses;
//   - programmed: tmg_prog_src, event codes read at 10 kHz along the cycle;
//   - global:     messages decoded from the incoming GTN line.
// Every source feeds two masked gates (tm_mask), one towards the GTN and one
// towards the LTN, and each gate feeds its own FIFO (tm_fifo): six gates,
// six FIFOs. A round-robin arbiter (tm_arbiter) merges the three GTN FIFOs
// into the GTN Manchester encoder and another merges the three LTN FIFOs
// into the LTN encoder. Only error-free global messages are accepted. The
// global-to-global gate must be closed for the generator's own codes so
// that a message stops after one turn of the ring.
//
// Host interface: cfg (see gts_pkg::cfg_t) writes the six masks, both RAMs,
// the operational data word and the cycle length, one item per clock.
// cycle_start restarts the 10 kHz clock at slot 0; cycle_stop halts it.
// fifo_ovf shows a FIFO that dropped a message (order: LOC_GTN, LOC_LTN,
// PRG_GTN, PRG_LTN, GLB_GTN, GLB_LTN), cleared by clr_ovf.
//
// Timing: with the defaults (12 MHz, 1 Mbit/s) a message takes 44 us on a
// line (two 20 us words and a 4 us gap), so an idle LTN carries the 10 kHz
// flow with room for one more message per tick. The block structure follows
// the document's block diagram; the arbitration order, FIFO depth and host
// port are this design's choices.
module tmg
  import gts_pkg::*;
#(
  parameter int unsigned N_LOCAL    = 8,
  parameter int unsigned PROG_AW    = 17,
  parameter int unsigned TICK_DIV   = 1200,
  parameter int unsigned HALF_BIT   = 6,
  parameter int unsigned GAP_BITS   = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  logic [N_LOCAL-1:0] local_pulse,
  input  logic               cycle_start,
  input  logic               cycle_stop,
  input  mil_line_t          gtn_in,
  output mil_line_t          gtn_out,
  output mil_line_t          ltn_out,
  output logic               tick,
  output logic               running,
  output logic [5:0]         fifo_ovf,
  input  logic               clr_ovf,
  output logic               gtn_rx_err,
  output logic               local_lost
);

  // Host registers.
  word_t            opdata;
  logic [PROG_AW:0] cycle_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opdata    <= '0;
      cycle_len <= '0;
    end else if (cfg.we) begin
      if (cfg.sel == SEL_OPDATA)    opdata    <= cfg.data;
      if (cfg.sel == SEL_CYCLE_LEN) cycle_len <= (PROG_AW+1)'(cfg.addr);
    end
  end

  // Sources: index 0 local, 1 programmed, 2 global.
  logic src_valid [3];
  tm_t  src_tm    [3];

  tmg_local_src #(.N_LOCAL(N_LOCAL)) u_loc (
    .clk, .rst_n, .local_pulse,
    .code_we  (cfg.we && cfg.sel == SEL_RAM_LOC),
    .code_addr(cfg.addr[$clog2(N_LOCAL)-1:0]),
    .code_data(cfg.data),
    .opdata,
    .out_valid(src_valid[0]), .out_tm(src_tm[0]), .lost(local_lost)
  );

  logic [PROG_AW:0] slot;
  tmg_prog_src #(.PROG_AW(PROG_AW), .TICK_DIV(TICK_DIV)) u_prg (
    .clk, .rst_n,
    .code_we  (cfg.we && cfg.sel == SEL_RAM_PRG),
    .code_addr(cfg.addr[PROG_AW-1:0]),
    .code_data(cfg.data),
    .cycle_len, .opdata,
    .start(cycle_start), .stop(cycle_stop),
    .out_valid(src_valid[1]), .out_tm(src_tm[1]),
    .tick, .running, .slot
  );

  logic rx_valid, rx_ok, rx_cw_perr, rx_dw_perr, rx_code_err, rx_frame_err;
  logic rx_clk_pulse;
  event_t rx_event;
  mil_decoder #(.HALF_BIT(HALF_BIT)) u_gdec (
    .clk, .rst_n, .line(gtn_in),
    .clk_pulse(rx_clk_pulse), .cw_event(rx_event),
    .tm_valid(rx_valid), .tm(src_tm[2]), .tm_ok(rx_ok),
    .cw_perr(rx_cw_perr), .dw_perr(rx_dw_perr), .code_err(rx_code_err),
    .frame_err(rx_frame_err)
  );
  assign src_valid[2] = rx_valid && rx_ok;
  assign gtn_rx_err   = (rx_valid && !rx_ok) || rx_frame_err;

  // Six masked gates and FIFOs: gate g = 2*source + (0 GTN, 1 LTN).
  logic       q_empty [6];
  tm_t        q_head  [6];
  logic [5:0] q_pop;

  for (genvar g = 0; g < 6; g++) begin : g_path
    logic   gv;
    tm_t    gt;
    logic   unused_blk;
    logic   unused_full;
    logic [$clog2(FIFO_DEPTH):0] unused_cnt;
    logic [2*EVENT_W-1:0] unused_bits;

    tm_mask u_mask (
      .clk, .rst_n,
      .mask_we  (cfg.we && cfg.sel == cfg_sel_e'(g)),
      .mask_addr(cfg.addr[EVENT_W-1:0]),
      .mask_bit (cfg.data[0]),
      .in_valid (src_valid[g/2]), .in_tm(src_tm[g/2]),
      .out_valid(gv), .out_tm(gt), .blocked(unused_blk)
    );

    tm_fifo #(.WIDTH($bits(tm_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(gv), .wr_data(gt),
      .rd_en(q_pop[g]), .rd_data(q_head[g]),
      .empty(q_empty[g]), .full(unused_full), .count(unused_cnt),
      .overflow(fifo_ovf[g]), .clr_ovf
    );
  end

  // Merge onto the two encoders.
  logic [2:0] g_req, l_req, g_pop, l_pop;
  tm_t        g_dat [3];
  tm_t        l_dat [3];
  for (genvar s = 0; s < 3; s++) begin : g_merge
    assign g_req[s] = !q_empty[2*s];
    assign l_req[s] = !q_empty[2*s+1];
    assign g_dat[s] = q_head[2*s];
    assign l_dat[s] = q_head[2*s+1];
    assign q_pop[2*s]   = g_pop[s];
    assign q_pop[2*s+1] = l_pop[s];
  end

  logic g_valid, g_ready, l_valid, l_ready, g_busy, l_busy;
  tm_t  g_tm, l_tm;

  tm_arbiter #(.N(3)) u_garb (
    .clk, .rst_n, .req(g_req), .data(g_dat), .pop(g_pop),
    .out_valid(g_valid), .out_tm(g_tm), .out_ready(g_ready)
  );
  tm_arbiter #(.N(3)) u_larb (
    .clk, .rst_n, .req(l_req), .data(l_dat), .pop(l_pop),
    .out_valid(l_valid), .out_tm(l_tm), .out_ready(l_ready)
  );

  mil_encoder #(.HALF_BIT(HALF_BIT), .GAP_BITS(GAP_BITS)) u_genc (
    .clk, .rst_n, .tm_valid(g_valid), .tm(g_tm), .tm_ready(g_ready),
    .line(gtn_out), .busy(g_busy)
  );
  mil_encoder #(.HALF_BIT(HALF_BIT), .GAP_BITS(GAP_BITS)) u_lenc (
    .clk, .rst_n, .tm_valid(l_valid), .tm(l_tm), .tm_ready(l_ready),
    .line(ltn_out), .busy(l_busy)
  );

endmodule
