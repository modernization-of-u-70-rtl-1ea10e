// tb_tm_registrar: checks the timing message registering device.
//
// One accelerator cycle: str starts the time count, 5 kHz time marks are
// given every TM_PER clocks, random messages (some with the null event
// code, which must not be recorded) arrive at random times. The host then
// reads both RAMs from address 0 and compares them with a model: Command
// Word at the even address, Data Word at the odd one, both with the time
// count at arrival. Also checks the w1..w5 sequence length (a message every
// 6 clocks is accepted, one inside a running sequence is ignored), the
// end-of-cycle IRQ, the zero-count status, the address overflow after
// 2**(ADDR_W-1) messages fill the RAM and the time counter overflow.
module tb_tm_registrar;
  import gts_pkg::*;

  localparam int AW = 8, TW = 16, TM_PER = 7;

  logic clk = 0, rst_n = 1;
  logic st0 = 0, time_mark = 0, str = 0, rst = 0, cycle_end = 0;
  logic ld_addr = 0, rd = 0, irq_ack = 0;
  logic [AW-1:0] ld_val = '0, addr;
  tm_t tm = '0;
  word_t rd_code;
  logic [TW-1:0] rd_time, time_cnt;
  logic [2:0] status;
  logic irq;
  int checks = 0, failures = 0;

  tm_registrar #(.ADDR_W(AW), .TIME_W(TW)) dut (.*);

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

  // Time marks and a model of the time count.
  int ref_time = 0;
  bit marks_on = 1, ref_run = 0;
  int mark_div = 0;
  always @(posedge clk) begin
    #1;
    if (str) begin ref_run = 1; ref_time = 0; end
    else if (ref_run && time_mark) ref_time = (ref_time + 1) % 65536;
    mark_div = (mark_div + 1) % TM_PER;
    time_mark = marks_on && (mark_div == 0);
  end

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #2 s = 0;
  endtask

  word_t exp_code [$];
  int    exp_time [$];

  task automatic send(tm_t m);
    tm = m;
    st0 = 1;
    @(posedge clk);
    if (m.cw[7:0] != 0) begin
      exp_code.push_back(m.cw); exp_time.push_back(ref_time);
      exp_code.push_back(m.dw); exp_time.push_back(ref_time);
    end
    #2 st0 = 0;
  endtask

  task automatic read_back(int n);
    ld_val = '0; pulse(ld_addr);
    for (int a = 0; a < n; a++) begin
      rd = 1; @(posedge clk); #2 rd = 0;
      check(rd_code == exp_code[a] && rd_time == 16'(exp_time[a]),
            $sformatf("addr %0d: got %h@%0d exp %h@%0d", a, rd_code, rd_time, exp_code[a], exp_time[a]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    // Cycle 1: no messages -> zero count.
    pulse(str);
    repeat (50) @(posedge clk); #2;
    pulse(cycle_end);
    check(irq && status == 3'b100, $sformatf("empty cycle: irq=%0b status=%b", irq, status));
    pulse(irq_ack);
    check(!irq && status == 0, "acknowledge");
    pulse(rst);

    // Cycle 2: 40 messages.
    pulse(str);
    for (int n = 0; n < 40; n++) begin
      tm_t m;
      m = '{cw: 16'($urandom), dw: 16'($urandom)};
      if (n % 5 == 0) m.cw[7:0] = 0;
      repeat ($urandom_range(6, 60)) @(posedge clk);
      #2 send(m);
    end
    repeat (10) @(posedge clk); #2;
    check(!irq, "no irq during a normal cycle");
    check(addr == 8'(exp_code.size()), $sformatf("address counter %0d, expected %0d", addr, exp_code.size()));
    pulse(cycle_end);
    check(irq && status == 0, $sformatf("end of cycle irq, status %b", status));
    read_back(exp_code.size());
    pulse(irq_ack);
    pulse(rst);
    exp_code.delete(); exp_time.delete();

    // Sequence length: messages 6 clocks apart are all taken, one 3 clocks
    // after the previous is ignored.
    pulse(str);
    for (int n = 0; n < 4; n++) begin
      send('{cw: 16'h0100 + 16'(n + 1), dw: 16'(n)});
      repeat (n < 3 ? 5 : 2) @(posedge clk); #2;
    end
    tm = '{cw: 16'h00AA, dw: 16'h0000}; st0 = 1; @(posedge clk); #2 st0 = 0;   // inside w1..w5
    repeat (10) @(posedge clk); #2;
    check(addr == 8, $sformatf("back-to-back: address %0d", addr));
    read_back(8);
    pulse(rst);
    exp_code.delete(); exp_time.delete();

    // Address overflow: the 128th message fills the RAM and wraps the
    // counter; the 129th is not recorded.
    pulse(str);
    for (int n = 0; n < 129; n++) begin
      send('{cw: 16'h0001, dw: 16'(n)});
      repeat (6) @(posedge clk); #2;
      if (n == 126) check(!irq, "no overflow before the RAM is full");
      if (n == 127) check(irq && status[0], "overflow when the 128th message fills the RAM");
    end
    check(irq && status[0], "address counter overflow");
    pulse(irq_ack);
    pulse(rst);

    // Time overflow: no restart for 65536 marks.
    pulse(str);
    repeat (65536 * TM_PER + 20) @(posedge clk); #2;
    check(irq && status[1], "time counter overflow");
    pulse(irq_ack);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
