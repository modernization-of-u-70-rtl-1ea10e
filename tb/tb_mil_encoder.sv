// tb_mil_encoder: checks the Manchester-II encoder half-bit by half-bit.
//
// Sends random messages and samples the line in the middle of every
// half-bit, comparing it with the reference pattern of the Command Word
// followed by the Data Word. Also checks that a half-bit lasts HALF_BIT
// clocks, that a message lasts 80 half-bits and that back-to-back messages
// are separated by exactly GAP_BITS idle bit times.
module tb_mil_encoder;
  import gts_pkg::*;
  import tb_util_pkg::*;

  localparam int HB  = 6;
  localparam int GAP = 4;

  logic clk = 0, rst_n = 1;
  logic tm_valid = 0;
  tm_t  tm;
  logic tm_ready, busy;
  mil_line_t line;
  int checks = 0, failures = 0;

  mil_encoder #(.HALF_BIT(HB), .GAP_BITS(GAP)) dut (.*);

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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run-length monitor: every burst on the line must last 80 half-bits,
  // and between back-to-back messages (n >= 10) the idle gap must be
  // exactly GAP_BITS bit times.
  int act_run = 0, idle_run = 0, bursts = 0;
  bit b2b = 0;
  always @(posedge clk) if (rst_n) begin
    if (line.act) begin
      if (idle_run > 0 && bursts > 10) begin
        check(idle_run == 2*GAP*HB, $sformatf("gap %0d clocks, expected %0d", idle_run, 2*GAP*HB));
      end
      idle_run = 0;
      act_run++;
    end else begin
      if (act_run > 0) begin
        check(act_run == 80*HB, $sformatf("burst %0d clocks, expected %0d", act_run, 80*HB));
        bursts++;
      end
      act_run = 0;
      idle_run++;
    end
  end

  initial begin
    tm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 20; n++) begin
      logic [79:0] exp;
      tm.cw = 16'($urandom);
      tm.dw = 16'($urandom);
      if (n == 0) tm = '{cw: 16'hFFFF, dw: 16'h0000};
      exp = {ref_halfbits(tm.cw, 1), ref_halfbits(tm.dw, 0)};
      check(tm_ready, "ready when idle");
      tm_valid = 1;
      @(posedge clk);            // handshake edge
      #1 tm_valid = 0;
      // first half-bit appears after the next edge; sample mid half-bit
      @(posedge clk);
      repeat (HB/2) @(posedge clk);
      for (int h = 0; h < 80; h++) begin
        #1;
        check(line.act == 1 && line.lvl == exp[79-h],
              $sformatf("msg %0d half-bit %0d exp %0b got act=%0b lvl=%0b", n, h, exp[79-h], line.act, line.lvl));
        repeat (HB) @(posedge clk);
      end
      // now in the middle of the gap
      #1;
      check(line.act == 0, "idle during gap");
      while (!tm_ready) begin @(posedge clk); #1; end
      if (n < 10) begin repeat ($urandom_range(1, 3)) @(posedge clk); #1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
