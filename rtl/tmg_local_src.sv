// tmg_local_src: local event source of a timing message generator.
//
// A small RAM holds one Command Word (event code) per local channel. A
// rising edge on a channel's local pulse input (after a two-flop
// synchroniser) marks the channel pending; every clock the lowest pending
// channel is read out as a timing message {RAM[channel], opdata} on
// out_valid, so pulses that arrive together leave in channel order on
// consecutive clocks. A pulse that arrives while its channel is still
// pending is counted as lost (sticky flag).
//
// Timing: a message leaves 3 clocks after the pulse edge reaches the input
// (two synchroniser flops, edge register). The RAM read by local pulses
// follows the document; the channel count, the priority order and the
// synchroniser are this design's choices.
module tmg_local_src
  import gts_pkg::*;
#(
  parameter int unsigned N_LOCAL = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_LOCAL-1:0]         local_pulse,
  input  logic                       code_we,
  input  logic [$clog2(N_LOCAL)-1:0] code_addr,
  input  word_t                      code_data,
  input  word_t                      opdata,
  output logic                       out_valid,
  output tm_t                        out_tm,
  output logic                       lost
);

  word_t              ram [N_LOCAL];
  logic [N_LOCAL-1:0] s1, s2, s3, pending, pick;

  always_ff @(posedge clk) begin
    if (code_we) ram[code_addr] <= code_data;
  end

  // Lowest pending channel, one-hot.
  assign pick = pending & (~pending + 1'b1);

  always_comb begin
    out_valid = |pending;
    out_tm    = '{cw: '0, dw: opdata};
    for (int i = 0; i < N_LOCAL; i++) begin
      if (pick[i]) out_tm.cw = ram[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; pending <= '0; lost <= 1'b0;
    end else begin
      s1 <= local_pulse; s2 <= s1; s3 <= s2;
      pending <= (pending & ~pick) | (s2 & ~s3);
      if (|(s2 & ~s3 & pending & ~pick)) lost <= 1'b1;
    end
  end

endmodule
