// tb_mil_decoder: checks the Manchester-II decoder against reference words.
//
// Drives the line from the reference half-bit patterns of tb_util_pkg:
// random good messages, messages with a parity error in the Command or the
// Data Word, a Manchester coding error, a Command Word with no Data Word
// and a lone Data Word. Checks the decoded words and every error flag, that
// clk_pulse comes with the right event code within one half-bit after the
// end of the Command Word, and that tm_valid follows it one word time
// (40 half-bits) later.
module tb_mil_decoder;
  import gts_pkg::*;
  import tb_util_pkg::*;

  localparam int HB = 6;

  logic clk = 0, rst_n = 1;
  mil_line_t line = '{act: 1'b0, lvl: 1'b0};
  logic   clk_pulse, tm_valid, tm_ok, cw_perr, dw_perr, code_err, frame_err;
  event_t cw_event;
  tm_t    tm;
  int checks = 0, failures = 0;

  mil_decoder #(.HALF_BIT(HB)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitors: record what the decoder reported and when.
  longint cyc = 0;
  longint t_clk_pulse, t_tm_valid, t_word_end;
  int n_clk_pulse = 0, n_tm = 0, n_frame = 0;
  event_t ev_seen;
  tm_t tm_seen;
  logic ok_seen, cwp_seen, dwp_seen, cerr_seen;
  always @(posedge clk) begin
    cyc++;
    if (clk_pulse) begin n_clk_pulse++; t_clk_pulse = cyc; ev_seen = cw_event; end
    if (tm_valid) begin
      n_tm++; t_tm_valid = cyc; tm_seen = tm; ok_seen = tm_ok;
      cwp_seen = cw_perr; dwp_seen = dw_perr; cerr_seen = code_err;
    end
    if (frame_err) n_frame++;
  end

  task automatic send_word(logic [15:0] w, bit cmd, bit bad_par = 0, bit bad_code = 0);
    logic [39:0] p;
    p = ref_halfbits(w, cmd, bad_par, bad_code);
    for (int h = 39; h >= 0; h--) begin
      line = '{act: 1'b1, lvl: p[h]};
      repeat (HB) @(posedge clk);
      #1;
    end
    t_word_end = cyc;
  endtask

  task automatic idle(int bits);
    line = '{act: 1'b0, lvl: 1'b0};
    repeat (bits * 2 * HB) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    idle(2);
    for (int n = 0; n < 60; n++) begin
      logic [15:0] cw, dw;
      int kind, cp0, tm0, fr0;
      longint t_cw_end;
      cw = 16'($urandom); dw = 16'($urandom);
      kind = (n < 30) ? 0 : int'($urandom_range(0, 5));
      cp0 = n_clk_pulse; tm0 = n_tm; fr0 = n_frame;
      case (kind)
        0, 1, 2, 3: begin
          send_word(cw, 1, kind == 1, 0);
          t_cw_end = t_word_end;
          send_word(dw, 0, kind == 2, kind == 3);
          idle(4);
          check(n_tm == tm0 + 1, $sformatf("msg %0d kind %0d: one tm_valid", n, kind));
          check(tm_seen.cw == cw && tm_seen.dw == dw, $sformatf("msg %0d words %h %h got %h %h", n, cw, dw, tm_seen.cw, tm_seen.dw));
          check(ok_seen == (kind == 0), $sformatf("msg %0d kind %0d tm_ok", n, kind));
          check(cwp_seen == (kind == 1), $sformatf("msg %0d kind %0d cw_perr", n, kind));
          check(dwp_seen == (kind == 2), $sformatf("msg %0d kind %0d dw_perr", n, kind));
          check(cerr_seen == (kind == 3), $sformatf("msg %0d kind %0d code_err", n, kind));
          check(n_frame == fr0, $sformatf("msg %0d no frame error", n));
          if (kind != 1) begin
            check(n_clk_pulse == cp0 + 1 && ev_seen == cw[7:0], $sformatf("msg %0d clock pulse / event", n));
            check(t_clk_pulse > t_cw_end - HB && t_clk_pulse <= t_cw_end + HB,
                  $sformatf("msg %0d clock pulse at %0d, CW ended %0d", n, t_clk_pulse, t_cw_end));
            check(t_tm_valid - t_clk_pulse == 40 * HB, $sformatf("msg %0d DW after CW %0d clocks", n, t_tm_valid - t_clk_pulse));
          end else begin
            check(n_clk_pulse == cp0, $sformatf("msg %0d no clock pulse for a bad CW", n));
          end
        end
        4: begin      // Command Word alone
          send_word(cw, 1);
          idle(4);
          check(n_tm == tm0 && n_frame == fr0 + 1, $sformatf("msg %0d lone CW: frame error", n));
        end
        default: begin // Data Word alone
          send_word(dw, 0);
          idle(4);
          check(n_tm == tm0 && n_frame == fr0 + 1, $sformatf("msg %0d lone DW: frame error", n));
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
