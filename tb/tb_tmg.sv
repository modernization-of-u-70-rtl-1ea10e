// tb_tmg: checks the timing message generator end to end on its lines.
//
// Own event codes: 0x10..0x17 (local channels), 0x20.. (programmed).
// Foreign global codes: 0x80..0x8F. Masks: local and programmed events go
// to the LTN; local events and the even programmed codes go to the GTN;
// foreign global events go to the LTN and are forwarded on the GTN except
// 0x8F; the generator's own codes coming back round the ring are closed in
// both global gates. Behavioural monitors decode the GTN and LTN lines.
// Checks:
//   - a programmed cycle of LEN slots gives LEN messages on the LTN, one
//     per 1200 clocks (10 kHz), with the RAM codes and the data word, and
//     the even ones on the GTN;
//   - local pulses and foreign global messages reach the gates' outputs;
//   - an own code returning on the GTN input goes nowhere (end of the
//     ring), 0x8F is delivered locally but not forwarded;
//   - a corrupted global message is dropped and flagged;
//   - a burst of local pulses overflows the local FIFOs and sets fifo_ovf.
module tb_tmg;
  import gts_pkg::*;
  import tb_util_pkg::*;

  localparam int HB = 6, AW = 6, DIV = 1200, LEN = 12;

  logic clk = 0, rst_n = 1;
  cfg_t cfg = '0;
  logic [7:0] local_pulse = '0;
  logic cycle_start = 0, cycle_stop = 0, clr_ovf = 0;
  mil_line_t gtn_in = '{act: 1'b0, lvl: 1'b0};
  mil_line_t gtn_out, ltn_out;
  logic tick, running, gtn_rx_err, local_lost;
  logic [5:0] fifo_ovf;
  int checks = 0, failures = 0;

  tmg #(.N_LOCAL(8), .PROG_AW(AW), .TICK_DIV(DIV), .HALF_BIT(HB), .GAP_BITS(4), .FIFO_DEPTH(16))
    dut (.*);
  tb_mil_monitor #(.HB(HB)) mon_g (.clk, .line(gtn_out));
  tb_mil_monitor #(.HB(HB)) mon_l (.clk, .line(ltn_out));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(cfg_sel_e sel, int addr, int data);
    cfg = '{we: 1'b1, sel: sel, addr: 20'(addr), data: 16'(data)};
    @(posedge clk); #1 cfg = '0;
  endtask

  int rx_err_n = 0;
  always @(posedge clk) if (gtn_rx_err) rx_err_n++;

  task automatic send_gtn(logic [15:0] c, logic [15:0] d, bit bad = 0);
    logic [79:0] p;
    p = {ref_halfbits(c, 1, bad), ref_halfbits(d, 0)};
    for (int h = 79; h >= 0; h--) begin
      gtn_in = '{act: 1'b1, lvl: p[h]};
      repeat (HB) @(posedge clk); #1;
    end
    gtn_in = '{act: 1'b0, lvl: 1'b0};
    repeat (8 * HB) @(posedge clk); #1;
  endtask

  function automatic int count_code(tm_t q [$], int code);
    int n = 0;
    foreach (q[i]) if (q[i].cw[7:0] == code) n++;
    return n;
  endfunction

  word_t prg [LEN];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 16'h10; e < 16'h18; e++) begin
      wr(SEL_MASK_LOC_LTN, e, 1); wr(SEL_MASK_LOC_GTN, e, 1);
      wr(SEL_RAM_LOC, e - 16'h10, 16'h0100 | e);
    end
    for (int k = 0; k < LEN; k++) begin
      prg[k] = 16'h0200 | 16'(16'h20 + k);
      wr(SEL_RAM_PRG, k, prg[k]);
      wr(SEL_MASK_PRG_LTN, 16'h20 + k, 1);
      if (k % 2 == 0) wr(SEL_MASK_PRG_GTN, 16'h20 + k, 1);
    end
    for (int e = 16'h80; e < 16'h90; e++) begin
      wr(SEL_MASK_GLB_LTN, e, 1);
      if (e != 16'h8F) wr(SEL_MASK_GLB_GTN, e, 1);
    end
    wr(SEL_OPDATA, 0, 16'h5A5A);
    wr(SEL_CYCLE_LEN, LEN, 0);

    // Programmed cycle.
    cycle_start = 1; @(posedge clk); #1 cycle_start = 0;
    repeat ((LEN + 2) * DIV) @(posedge clk); #1;
    check(mon_l.got.size() == LEN, $sformatf("LTN carried %0d programmed messages", mon_l.got.size()));
    for (int k = 0; k < mon_l.got.size() && k < LEN; k++) begin
      check(mon_l.got[k].cw == prg[k] && mon_l.got[k].dw == 16'h5A5A, $sformatf("slot %0d message", k));
      if (k > 0) check(mon_l.t_got[k] - mon_l.t_got[k-1] == DIV, $sformatf("10 kHz spacing %0d", mon_l.t_got[k] - mon_l.t_got[k-1]));
    end
    check(mon_g.got.size() == LEN / 2, $sformatf("GTN carried %0d programmed messages", mon_g.got.size()));
    foreach (mon_g.got[i]) check(mon_g.got[i].cw == prg[2*i], "GTN carries the even slots");
    check(!running, "clock stopped at end of cycle");
    mon_l.got.delete(); mon_g.got.delete();

    // Local pulses on three channels together.
    local_pulse = 8'b1001_0010;
    repeat (3) @(posedge clk); #1 local_pulse = '0;
    repeat (2000) @(posedge clk); #1;
    check(mon_l.got.size() == 3 && mon_g.got.size() == 3, "local events on both networks");
    if (mon_l.got.size() == 3) check(mon_l.got[0].cw == 16'h0111 && mon_l.got[1].cw == 16'h0114 && mon_l.got[2].cw == 16'h0117, "local codes in channel order");
    mon_l.got.delete(); mon_g.got.delete();

    // Global messages: foreign, foreign not forwarded, own returning, corrupted.
    send_gtn(16'h0083, 16'h1234);
    send_gtn(16'h008F, 16'h4321);
    send_gtn(16'h0220, 16'h5A5A);
    send_gtn(16'h0084, 16'h9999, 1);
    repeat (1500) @(posedge clk); #1;
    check(count_code(mon_l.got, 8'h83) == 1 && count_code(mon_g.got, 8'h83) == 1, "foreign event delivered and forwarded");
    check(count_code(mon_l.got, 8'h8F) == 1 && count_code(mon_g.got, 8'h8F) == 0, "0x8F delivered, not forwarded");
    check(count_code(mon_l.got, 8'h20) == 0 && count_code(mon_g.got, 8'h20) == 0, "own code stops at end of ring");
    check(count_code(mon_l.got, 8'h84) == 0 && rx_err_n == 1, "corrupted global message dropped and flagged");
    foreach (mon_l.got[i]) if (mon_l.got[i].cw[7:0] == 8'h83) check(mon_l.got[i].dw == 16'h1234, "global data word kept");

    // Overflow: 8 channels pulsing every 20 clocks, 5 times -> 40 messages
    // into 16-deep FIFOs while each message takes 528 clocks to send.
    check(fifo_ovf == 0, "no overflow yet");
    for (int r = 0; r < 5; r++) begin
      local_pulse = '1; repeat (10) @(posedge clk); #1;
      local_pulse = '0; repeat (10) @(posedge clk); #1;
    end
    check(fifo_ovf[0] && fifo_ovf[1] && fifo_ovf[5:2] == 0, $sformatf("local FIFOs overflow, flags %b", fifo_ovf));
    clr_ovf = 1; @(posedge clk); #1 clr_ovf = 0;
    check(fifo_ovf == 0, "overflow flags cleared");
    check(mon_l.bad == 0 && mon_g.bad == 0, "all bursts well formed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
