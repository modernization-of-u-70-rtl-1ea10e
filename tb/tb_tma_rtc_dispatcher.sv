// tb_tma_rtc_dispatcher: checks the RTC dispatcher with an RTC model.
//
// The model's second lasts 30000 clocks; the dispatcher polls every 1000
// and counts 100 us units of 100 clocks (scaled-down clock). Checks that
// sec follows the RTC, that sub counts up within the second and restarts
// when the second changes (sec_tick), and that a time correction is
// written to the RTC, reported by set_done and used at once.
module tb_tma_rtc_dispatcher;
  localparam int SUBD = 100, POLL = 1000, SECC = 30000;

  logic clk = 0, rst_n = 1;
  logic rtc_req, rtc_we, rtc_ack, set_time = 0, set_done, sec_tick;
  logic [31:0] rtc_wdata, rtc_rdata, set_value = '0, sec;
  logic [15:0] sub;
  int checks = 0, failures = 0;

  tma_rtc_dispatcher #(.SUB_DIV(SUBD), .POLL_DIV(POLL)) dut (.*);
  tb_rtc_model #(.SEC_CLKS(SECC)) rtc (.clk, .req(rtc_req), .we(rtc_we), .wdata(rtc_wdata), .rdata(rtc_rdata), .ack(rtc_ack));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_tick = 0;
  always @(posedge clk) if (sec_tick) n_tick++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2 * POLL) @(posedge clk); #1;
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(100, 20000)) @(posedge clk); #1;
      check(sec == rtc.count || sec + 1 == rtc.count, $sformatf("sec %0d, RTC %0d", sec, rtc.count));
      check(sub <= (SECC + POLL) / SUBD + 10, $sformatf("sub %0d within the second", sub));
    end
    check(n_tick > 3, $sformatf("%0d second ticks", n_tick));
    // sub restarts at the second change
    begin
      logic [31:0] s0;
      logic [15:0] sub_before;
      s0 = sec;
      while (sec == s0) begin sub_before = sub; @(posedge clk); #1; end
      check(sub == 0 && sub_before >= (SECC - POLL) / SUBD - 5, $sformatf("sub %0d -> %0d at new second", sub_before, sub));
    end
    // time correction
    set_value = 32'h1234_5678;
    set_time = 1; @(posedge clk); #1 set_time = 0;
    begin
      int t;
      t = 0;
      while (!set_done && t < 100) begin @(posedge clk); #1; t++; end
      check(set_done, "set_done");
    end
    check(sec == 32'h1234_5678 && rtc.count == 32'h1234_5678, "time written and used");
    repeat (SECC + 2 * POLL) @(posedge clk); #1;
    check(sec == 32'h1234_5679, "counts on from the new time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
