// mil_decoder: Manchester-II decoder of GTS timing messages.
//
// Receives the {act, lvl} line (see gts_pkg), passes it through a two-flop
// synchroniser and samples every half-bit in its middle, starting from the
// moment the bus leaves idle. Each group of 40 half-bits is one MIL-STD-1553
// word: it is checked for a valid sync (Command or Data), Manchester coding
// (every bit cell must change level in its middle) and odd parity.
//
// Outputs:
//   clk_pulse  one-clock pulse when a Command Word arrives without errors;
//              this is the 10 kHz clock pulse the Command Word carries.
//   cw_event   event code of that Command Word, valid with clk_pulse.
//   tm_valid   one-clock pulse when the Data Word that completes a message
//              has arrived; tm holds both words. cw_perr / dw_perr give the
//              parity check of each word and code_err a sync or Manchester
//              error in either word. Messages with errors are delivered with
//              their flags set; a user that needs clean messages gates with
//              tm_ok.
//   frame_err  one-clock pulse for a malformed message (a Data Word without
//              a Command Word, a Command Word not followed by a Data Word,
//              or a word cut short by an idle bus).
//
// Timing: clk_pulse comes 3 clocks after the last half-bit of the Command
// Word left the transmitter's register (two synchroniser flops and the
// mid-half-bit sample point), tm_valid the same time after the Data Word.
// The decoder expects the transmitter's half-bit to last HALF_BIT of its own
// clocks; phase is taken once per message from the end of the idle state.
// The document gives the function (16-bit Command and Data Words, parity
// check); the sampling scheme and the error outputs are this design's.
module mil_decoder
  import gts_pkg::*;
#(
  parameter int unsigned HALF_BIT = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mil_line_t line,
  output logic      clk_pulse,
  output event_t    cw_event,
  output logic      tm_valid,
  output tm_t       tm,
  output logic      tm_ok,
  output logic      cw_perr,
  output logic      dw_perr,
  output logic      code_err,
  output logic      frame_err
);

  mil_line_t s1, s2;
  logic      act_d;
  logic      receiving;
  logic [$clog2(HALF_BIT+1)-1:0] cnt;
  logic [5:0]                    nhb;
  logic [WORD_HALFBITS-1:0]      sh;

  // Word-level results of the shift register, valid when nhb reaches 40.
  logic [WORD_HALFBITS-1:0] w_pat;
  word_t w_data;
  logic  w_is_cmd, w_is_dat, w_manch_ok, w_par_ok;

  assign w_pat = {sh[WORD_HALFBITS-2:0], s2.lvl};

  always_comb begin
    w_manch_ok = 1'b1;
    for (int i = 0; i < 17; i++) begin
      if (w_pat[33-2*i] == w_pat[32-2*i]) w_manch_ok = 1'b0;
    end
    for (int i = 0; i < 16; i++) w_data[15-i] = w_pat[33-2*i];
    w_is_cmd = (w_pat[39:34] == 6'b111000);
    w_is_dat = (w_pat[39:34] == 6'b000111);
    w_par_ok = (w_pat[1] == odd_parity(w_data));
  end

  logic  have_cw;
  word_t cw_hold;
  logic  cw_perr_hold, cw_cerr_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= LINE_IDLE; s2 <= LINE_IDLE; act_d <= 1'b0;
      receiving <= 1'b0; cnt <= '0; nhb <= '0; sh <= '0;
      have_cw <= 1'b0; cw_hold <= '0; cw_perr_hold <= 1'b0; cw_cerr_hold <= 1'b0;
      clk_pulse <= 1'b0; cw_event <= '0; tm_valid <= 1'b0; tm <= '0; tm_ok <= 1'b0;
      cw_perr <= 1'b0; dw_perr <= 1'b0; code_err <= 1'b0; frame_err <= 1'b0;
    end else begin
      s1 <= line; s2 <= s1; act_d <= s2.act;
      clk_pulse <= 1'b0; tm_valid <= 1'b0; frame_err <= 1'b0;

      if (!receiving) begin
        if (s2.act && !act_d) begin
          receiving <= 1'b1;
          cnt <= ($bits(cnt))'(HALF_BIT/2 - 1);
          nhb <= '0;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        cnt <= ($bits(cnt))'(HALF_BIT - 1);
        if (!s2.act) begin
          // Bus went idle: end of message.
          receiving <= 1'b0;
          if (nhb != 0 || have_cw) frame_err <= 1'b1;
          have_cw <= 1'b0;
        end else if (nhb == 6'(WORD_HALFBITS - 1)) begin
          nhb <= '0;
          sh  <= '0;
          if (w_is_cmd) begin
            if (have_cw) frame_err <= 1'b1;    // previous CW had no DW
            have_cw      <= 1'b1;
            cw_hold      <= w_data;
            cw_perr_hold <= !w_par_ok;
            cw_cerr_hold <= !w_manch_ok;
            if (w_par_ok && w_manch_ok) begin
              clk_pulse <= 1'b1;
              cw_event  <= w_data[EVENT_W-1:0];
            end
          end else if (w_is_dat && have_cw) begin
            have_cw  <= 1'b0;
            tm_valid <= 1'b1;
            tm       <= '{cw: cw_hold, dw: w_data};
            cw_perr  <= cw_perr_hold;
            dw_perr  <= !w_par_ok;
            code_err <= cw_cerr_hold | !w_manch_ok;
            tm_ok    <= !cw_perr_hold && !cw_cerr_hold && w_par_ok && w_manch_ok;
          end else begin
            have_cw   <= 1'b0;
            frame_err <= 1'b1;
          end
        end else begin
          nhb <= nhb + 6'd1;
          sh  <= w_pat;
        end
      end
    end
  end

endmodule
