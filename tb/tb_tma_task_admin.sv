// tb_tma_task_admin: checks the task administrator on its own.
//
// Drives the administrator's ports directly from the testbench:
//   - messages with a non-zero event code pass to the buffer and bare
//     clock messages (code 0) do not, in every task;
//   - a flush pulse comes every FLUSH_SEC second ticks;
//   - command 0x02 gives flush + xfer_start, task code 2, and every stream
//     word leaves as two bytes, high byte first, with out_ready on the
//     second byte; the task returns to archiving after the last word;
//   - command 0x03 and four bytes give set_time with the value high byte
//     first; the task returns to archiving on set_done;
//   - unknown command bytes change nothing.
// A small stream source and a byte sink with random tx_ready stand in for
// the memory and serial dispatchers.
module tb_tma_task_admin;
  import gts_pkg::*;
  localparam int FS = 10;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0, tm_valid, rx_valid = 0, tx_valid, tx_ready = 0;
  tm_t  in_tm = '0, tm;
  logic [7:0] rx_byte = '0, tx_byte;
  logic flush, xfer_start, out_valid = 0, out_last = 0, out_ready;
  task_e task_code;
  word_t out_word = '0;
  logic set_time, set_done = 0, sec_tick = 0;
  logic [31:0] set_value;
  int checks = 0, failures = 0;

  tma_task_admin #(.FLUSH_SEC(FS)) dut (.*);

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

  int n_flush = 0, n_xfer = 0, n_set = 0;
  logic [7:0] bytes [$];
  always @(posedge clk) begin
    if (flush) n_flush++;
    if (xfer_start) n_xfer++;
    if (set_time) n_set++;
    if (tx_valid && tx_ready) bytes.push_back(tx_byte);
  end

  task automatic cmd(logic [7:0] b);
    rx_valid = 1; rx_byte = b;
    @(posedge clk); #1 rx_valid = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic send_msgs(int n);
    for (int i = 0; i < n; i++) begin
      tm_t m;
      m = {16'($urandom), 8'($urandom), 8'($urandom_range(0, 3))};
      in_tm = m; in_valid = 1;
      #1 check(tm_valid == (m.cw[7:0] != 0) && tm == m, "message pass / skip of bare clock");
      @(posedge clk); #1 in_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(task_code == TASK_ARCHIVE, "archiving at power-on");
    send_msgs(20);

    // flush every FS seconds
    for (int s = 0; s < 3 * FS; s++) begin
      sec_tick = 1; @(posedge clk); #1 sec_tick = 0;
      repeat (3) @(posedge clk); #1;
    end
    check(n_flush == 3, $sformatf("%0d flushes in %0d seconds", n_flush, 3 * FS));

    cmd(8'h7E);
    check(task_code == TASK_ARCHIVE && n_flush == 3 && n_xfer == 0, "unknown command ignored");

    // transfer
    cmd(8'h02);
    check(task_code == TASK_TRANSFER && n_flush == 4 && n_xfer == 1, "transfer started with flush");
    fork
      send_msgs(10);
      begin
        word_t words [8];
        foreach (words[i]) words[i] = 16'($urandom);
        for (int i = 0; i < 8; i++) begin
          out_valid = 1; out_word = words[i]; out_last = (i == 7);
          tx_ready = $urandom_range(0, 1);
          @(posedge clk);
          while (!(out_ready && out_valid)) begin #1 tx_ready = $urandom_range(0, 1); @(posedge clk); end
          #1;
        end
        out_valid = 0; out_last = 0; tx_ready = 0;
        check(bytes.size() == 16, $sformatf("%0d bytes for 8 words", bytes.size()));
        for (int i = 0; i < 8 && i * 2 + 1 < bytes.size(); i++)
          check({bytes[2*i], bytes[2*i+1]} == words[i], $sformatf("word %0d sent high byte first", i));
      end
    join
    @(posedge clk); #1;
    check(task_code == TASK_ARCHIVE, "back to archiving after the last word");

    // time correction
    cmd(8'h03);
    check(task_code == TASK_SET_TIME, "time correction task");
    cmd(8'hDE); cmd(8'hAD); cmd(8'hBE);
    check(n_set == 0, "no set before the fourth byte");
    cmd(8'hEF);
    check(n_set == 1 && set_value == 32'hDEADBEEF, "new time, high byte first");
    check(task_code == TASK_SET_TIME, "waits for the RTC");
    send_msgs(5);
    set_done = 1; @(posedge clk); #1 set_done = 0;
    check(task_code == TASK_ARCHIVE, "back to archiving after set_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
