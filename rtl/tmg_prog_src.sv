// tmg_prog_src: programmed event source and 10 kHz clock of a timing
// message generator.
//
// A RAM of 2**PROG_AW Command Words describes the accelerator cycle on a
// 100 us time scale. A divider makes the 10 kHz tick from the system clock
// (TICK_DIV clocks per tick). While running, every tick reads the next RAM
// word and sends it as a timing message {RAM[slot], opdata}, so the local
// network carries one message per tick; a word whose event code is zero is
// a bare clock pulse. After cycle_len slots the source stops (end of
// accelerator cycle): the host can then rewrite the RAM, and a start pulse
// restarts the clock at slot 0 with a fresh tick phase. stop halts it at
// any time.
//
// Timing: the message for slot k leaves 1 clock after tick k (registered
// RAM read); the first tick comes TICK_DIV clocks after start. The RAM read
// at 10 kHz and the restart of the clock at the chosen moment follow the
// document; the RAM depth, the stop-at-end rule and the zero code as a
// clock-only message are this design's choices.
module tmg_prog_src
  import gts_pkg::*;
#(
  parameter int unsigned PROG_AW  = 17,
  parameter int unsigned TICK_DIV = 1200
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               code_we,
  input  logic [PROG_AW-1:0] code_addr,
  input  word_t              code_data,
  input  logic [PROG_AW:0]   cycle_len,
  input  word_t              opdata,
  input  logic               start,
  input  logic               stop,
  output logic               out_valid,
  output tm_t                out_tm,
  output logic               tick,
  output logic               running,
  output logic [PROG_AW:0]   slot
);

  word_t ram [2**PROG_AW];
  word_t rd_word;
  logic [$clog2(TICK_DIV)-1:0] div;
  logic fire, rd_pend;

  assign fire = running && (div == ($bits(div))'(TICK_DIV - 1));

  always_ff @(posedge clk) begin
    if (code_we) ram[code_addr] <= code_data;
    if (fire)    rd_word <= ram[slot[PROG_AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; div <= '0; slot <= '0; tick <= 1'b0; rd_pend <= 1'b0;
    end else begin
      tick    <= fire;
      rd_pend <= fire;
      if (start) begin
        running <= (cycle_len != 0);
        div     <= '0;
        slot    <= '0;
      end else if (stop) begin
        running <= 1'b0;
      end else if (running) begin
        if (fire) begin
          div  <= '0;
          slot <= slot + 1'b1;
          if (slot + 1'b1 >= cycle_len) running <= 1'b0;
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end

  assign out_valid = rd_pend;
  assign out_tm    = '{cw: rd_word, dw: opdata};

endmodule
