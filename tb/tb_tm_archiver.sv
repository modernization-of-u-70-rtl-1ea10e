// tb_tm_archiver: end-to-end check of the TM archiving device.
//
// The device runs on a scaled-down setup: FLASH of 1024 words with 64-word
// sectors, a 16-record buffer, 100 clocks per 100 us unit, an RTC model
// whose second is 20000 clocks, a flush every 2 seconds and 16 clocks per
// UART bit. The testbench plays the local timing network (Manchester-II
// words from the reference coder, bare clock messages mixed in, one message
// with a parity error) and the external computer (UART tasks on rxd/txd):
//   1. time correction (0x03 + four bytes) reaches the RTC chip;
//   2. messages are archived: after the periodic flush the write pointer
//      equals the number of messages with a non-zero event code;
//   3. transfer (0x02): the stream read back over txd holds the record
//      count and then every record in order, with the right words, a
//      seconds stamp equal to the RTC second when it was sent (the new
//      time) and a sub-second stamp below one second;
//   4. the task code returns to archiving and archiving goes on.
module tb_tm_archiver;
  import gts_pkg::*;
  import tb_util_pkg::*;
  localparam int HB = 6, BD = 16, FAW = 10, SAW = 6, SECC = 20000;

  logic clk = 0, rst_n = 1;
  mil_line_t ltn = '{act: 1'b0, lvl: 1'b0};
  logic rxd = 1, txd;
  logic fl_req, fl_ack, fr_req, fr_we, fr_ack, rtc_req, rtc_we, rtc_ack;
  fl_op_e fl_op;
  logic [FAW-1:0] fl_addr;
  word_t fl_wdata, fl_rdata, fr_wdata, fr_rdata;
  logic [11:0] fr_addr;
  logic [31:0] rtc_wdata, rtc_rdata, wp;
  task_e task_code;
  logic buf_ovf, rx_err, wrapped;
  int checks = 0, failures = 0;

  tm_archiver #(.HALF_BIT(HB), .BAUD_DIV(BD), .FLASH_AW(FAW), .SECTOR_AW(SAW), .FRAM_AW(12),
                .BUF_DEPTH(16), .SUB_DIV(100), .POLL_DIV(1000), .FLUSH_SEC(2)) dut (.*);
  tb_flash_model #(.AW(FAW), .SECTOR_AW(SAW), .LAT(3)) flash (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .rdata(fl_rdata), .ack(fl_ack));
  tb_fram_model #(.AW(12)) fram (
    .clk, .req(fr_req), .we(fr_we), .addr(fr_addr), .wdata(fr_wdata), .rdata(fr_rdata), .ack(fr_ack));
  tb_rtc_model #(.SEC_CLKS(SECC)) rtc (
    .clk, .req(rtc_req), .we(rtc_we), .wdata(rtc_wdata), .rdata(rtc_rdata), .ack(rtc_ack));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // External computer: UART transmitter and receiver.
  task automatic uart_send(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (BD) @(posedge clk);
      #1;
    end
  endtask

  logic [7:0] rx_q [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (BD + BD / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = txd;
        repeat (BD) @(posedge clk);
      end
      rx_q.push_back(b);
    end
  end

  // Local timing network.
  task automatic send_word(logic [15:0] w, bit cmd, bit bad_par = 0);
    logic [39:0] p;
    p = ref_halfbits(w, cmd, bad_par, 0);
    for (int h = 39; h >= 0; h--) begin
      ltn = '{act: 1'b1, lvl: p[h]};
      repeat (HB) @(posedge clk);
      #1;
    end
  endtask

  task automatic idle(int bits);
    ltn = '{act: 1'b0, lvl: 1'b0};
    repeat (bits * 2 * HB) @(posedge clk);
    #1;
  endtask

  arch_rec_t exp_q [$];

  task automatic send_msgs(int n);
    for (int i = 0; i < n; i++) begin
      logic [15:0] cw, dw;
      bit bad;
      cw = {8'($urandom), ((i % 4) == 0) ? 8'h00 : 8'($urandom_range(1, 255))};
      dw = 16'($urandom);
      bad = (i == 5);
      send_word(cw, 1);
      send_word(dw, 0, bad);
      if (!bad && cw[7:0] != 0) exp_q.push_back('{sec: rtc.count, sub: '0, cw: cw, dw: dw});
      idle($urandom_range(4, 400));
    end
  endtask

  task automatic transfer_and_check();
    word_t words [$];
    int n, t;
    rx_q.delete();
    uart_send(8'h02);
    @(posedge clk); #1;
    check(task_code == TASK_TRANSFER, "transfer task");
    t = 0;
    while (task_code == TASK_TRANSFER && t < 1000000) begin @(posedge clk); #1; t++; end
    repeat (12 * BD) @(posedge clk); #1;
    check(rx_q.size() % 2 == 0, "whole words received");
    for (int i = 0; i + 1 < rx_q.size(); i += 2) words.push_back({rx_q[i], rx_q[i+1]});
    n = exp_q.size();
    check(words.size() == 2 + 5 * n, $sformatf("%0d words, expected %0d", words.size(), 2 + 5 * n));
    if (words.size() >= 2) check({words[0], words[1]} == 32'(n), "record count");
    for (int r = 0; r < n && 6 + 5 * r < words.size(); r++) begin
      arch_rec_t g;
      g = {words[2+5*r], words[3+5*r], words[4+5*r], words[5+5*r], words[6+5*r]};
      check(g.cw == exp_q[r].cw && g.dw == exp_q[r].dw, $sformatf("record %0d words", r));
      check(g.sec == exp_q[r].sec || g.sec + 1 == exp_q[r].sec,
            $sformatf("record %0d second %0d, sent in %0d", r, g.sec, exp_q[r].sec));
      check(g.sub < 16'(SECC / 100 + 20), $sformatf("record %0d sub %0d", r, g.sub));
      if (r > 0) check({g.sec, g.sub} >= {words[2+5*(r-1)], words[3+5*(r-1)], words[4+5*(r-1)]},
                       $sformatf("record %0d in time order", r));
    end
    check(task_code == TASK_ARCHIVE, "back to archiving");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2000) @(posedge clk); #1;
    check(task_code == TASK_ARCHIVE, "archiving at switch-on");

    // 1. time correction
    uart_send(8'h03);
    uart_send(8'h00); uart_send(8'h01); uart_send(8'h00); uart_send(8'h00);
    repeat (200) @(posedge clk); #1;
    check(rtc.count == 32'h0001_0000, $sformatf("RTC set to %h", rtc.count));
    check(task_code == TASK_ARCHIVE, "back to archiving after time correction");

    // 2. archiving
    send_msgs(24);
    repeat (2 * 2 * SECC + 4000) @(posedge clk); #1;
    check(wp == 32'(exp_q.size()), $sformatf("write pointer %0d, expected %0d", wp, exp_q.size()));
    check({fram.mem[0], fram.mem[1]} == wp, "pointer kept in the FRAM");
    check(!buf_ovf && !rx_err && !wrapped, "no buffer overflow, serial error or wrap");

    // 3. transfer
    transfer_and_check();

    // 4. archiving goes on
    send_msgs(16);
    transfer_and_check();
    check(flash.n_double_write == 0, "no FLASH cell written twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
