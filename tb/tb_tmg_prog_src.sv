// tb_tmg_prog_src: checks the programmed event source and its 10 kHz clock.
//
// Uses the default TICK_DIV = 1200 (12 MHz / 10 kHz) and a small RAM.
// Loads random codes, starts a cycle of LEN slots and checks that exactly
// LEN messages come out, in RAM order, each one TICK_DIV clocks after the
// previous one and the first TICK_DIV+1 clocks after start, carrying the
// operational data word; that the source then stops; and that a restart in
// the middle of a cycle begins again at slot 0, and stop halts it.
module tb_tmg_prog_src;
  import gts_pkg::*;

  localparam int AW = 6, DIV = 1200, LEN = 20;
  logic clk = 0, rst_n = 1;
  logic code_we = 0, start = 0, stop = 0;
  logic [AW-1:0] code_addr = '0;
  word_t code_data = '0, opdata = 16'h0042;
  logic [AW:0] cycle_len = '0, slot;
  logic out_valid, tick, running;
  tm_t out_tm;
  word_t codes [2**AW];
  int checks = 0, failures = 0;

  tmg_prog_src #(.PROG_AW(AW), .TICK_DIV(DIV)) dut (.*);

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

  word_t got [$];
  int    got_t [$];
  int    cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      got.push_back(out_tm.cw);
      got_t.push_back(cyc);
      if (out_tm.dw != opdata) begin failures++; $display("FAIL: data word"); end
    end
  end

  task automatic pulse_start();
    start = 1; @(posedge clk); #1 start = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2**AW; i++) begin
      codes[i] = 16'($urandom);
      code_we = 1; code_addr = AW'(i); code_data = codes[i];
      @(posedge clk); #1;
    end
    code_we = 0;
    cycle_len = LEN;
    t0 = cyc + 1;
    pulse_start();
    repeat ((LEN + 3) * DIV) @(posedge clk); #1;
    check(got.size() == LEN, $sformatf("%0d messages in a cycle of %0d", got.size(), LEN));
    for (int k = 0; k < got.size(); k++) begin
      check(got[k] == codes[k], $sformatf("slot %0d code", k));
      if (k == 0) check(got_t[0] - t0 == DIV + 1, $sformatf("first message after %0d clocks", got_t[0] - t0));
      else        check(got_t[k] - got_t[k-1] == DIV, $sformatf("period %0d clocks", got_t[k] - got_t[k-1]));
    end
    check(!running, "stopped at end of cycle");
    // restart mid-cycle
    got.delete(); got_t.delete();
    pulse_start();
    repeat (5 * DIV + 10) @(posedge clk); #1;
    pulse_start();
    repeat (3 * DIV + 10) @(posedge clk); #1;
    check(got.size() == 8, $sformatf("restart: %0d messages", got.size()));
    if (got.size() == 8) check(got[5] == codes[0] && got[7] == codes[2], "restart begins at slot 0");
    stop = 1; @(posedge clk); #1 stop = 0;
    got.delete();
    repeat (3 * DIV) @(posedge clk); #1;
    check(got.size() == 0 && !running, "stop halts the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
