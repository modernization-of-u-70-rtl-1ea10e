// mil_encoder: Manchester-II encoder of a GTS timing message.
//
// Takes one timing message (Command Word + Data Word) through a valid/ready
// handshake and sends it as two back-to-back MIL-STD-1553 words: Command
// Word sync, 16 data bits MSB first, odd parity, then the Data Word with
// its own sync. After the message the bus is left idle for GAP_BITS bit
// times. The line is a {act, lvl} pair (see gts_pkg).
//
// Timing: each half-bit lasts HALF_BIT clocks. With the default 12 MHz
// clock and HALF_BIT = 6 the bit rate is the MIL-STD-1553 1 Mbit/s, one word
// takes 20 us and one message 40 us plus the gap. tm_ready is high only in
// the idle state; the first half-bit is on the line the clock after the
// handshake. The use of MIL-STD-1553 words follows the document; the clock
// frequency, the gap length and the handshake are this design's choices.
module mil_encoder
  import gts_pkg::*;
#(
  parameter int unsigned HALF_BIT = 6,
  parameter int unsigned GAP_BITS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tm_valid,
  input  tm_t       tm,
  output logic      tm_ready,
  output mil_line_t line,
  output logic      busy
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_GAP} state_e;
  state_e state;

  logic [WORD_HALFBITS-1:0] pat;
  logic [5:0]               hb_left;    // half-bits left in this word
  logic                     second;     // sending the Data Word
  word_t                    dw_hold;
  logic [$clog2(HALF_BIT+1)-1:0] hcnt;
  logic [$clog2(GAP_BITS*2*HALF_BIT+2)-1:0] gcnt;

  assign tm_ready = (state == S_IDLE);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pat     <= '0;
      hb_left <= '0;
      second  <= 1'b0;
      dw_hold <= '0;
      hcnt    <= '0;
      gcnt    <= '0;
      line    <= LINE_IDLE;
    end else begin
      unique case (state)
        S_IDLE: begin
          line <= LINE_IDLE;
          if (tm_valid) begin
            pat     <= word_pattern(tm.cw, 1'b1);
            dw_hold <= tm.dw;
            second  <= 1'b0;
            hb_left <= 6'(WORD_HALFBITS);
            hcnt    <= '0;
            state   <= S_SEND;
          end
        end
        S_SEND: begin
          line <= '{act: 1'b1, lvl: pat[WORD_HALFBITS-1]};
          if (hcnt == ($bits(hcnt))'(HALF_BIT - 1)) begin
            hcnt <= '0;
            pat  <= {pat[WORD_HALFBITS-2:0], 1'b0};
            if (hb_left == 6'd1) begin
              if (!second) begin
                second  <= 1'b1;
                pat     <= word_pattern(dw_hold, 1'b0);
                hb_left <= 6'(WORD_HALFBITS);
              end else begin
                gcnt  <= '0;
                state <= S_GAP;
              end
            end else begin
              hb_left <= hb_left - 6'd1;
            end
          end else begin
            hcnt <= hcnt + 1'b1;
          end
        end
        S_GAP: begin
          line <= LINE_IDLE;
          if (gcnt >= $bits(gcnt)'(GAP_BITS*2*HALF_BIT - 2)) state <= S_IDLE;
          else gcnt <= gcnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
