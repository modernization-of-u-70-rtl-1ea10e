// tb_tma_serial_dispatcher: checks the RS-232 port.
//
// Sends random bytes into rxd from a testbench UART at BAUD_DIV clocks per
// bit (with a small rate error), checks rx_byte/rx_valid, and that a frame
// with a bad stop bit is dropped with rx_err. Sends random bytes through
// the transmitter and decodes txd in the testbench: start bit, 8 data bits
// LSB first, stop bit, each bit exactly BAUD_DIV clocks long.
module tb_tma_serial_dispatcher;
  localparam int BD = 104;

  logic clk = 0, rst_n = 1;
  logic rxd = 1, txd, rx_valid, rx_err, tx_valid = 0, tx_ready;
  logic [7:0] rx_byte, tx_byte = '0;
  int checks = 0, failures = 0;

  tma_serial_dispatcher #(.BAUD_DIV(BD)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] got [$];
  int n_err = 0;
  always @(posedge clk) begin
    if (rx_valid) got.push_back(rx_byte);
    if (rx_err) n_err++;
  end

  task automatic uart_send(logic [7:0] b, int bit_clks, bit bad_stop = 0);
    logic [9:0] f;
    f = {!bad_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bit_clks) @(posedge clk);
      #1;
    end
    rxd = 1;
    repeat (bit_clks) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      uart_send(b, BD + (n % 3) - 1);
      check(got.size() == 1 && got[0] == b, $sformatf("received byte %h", b));
      got.delete();
    end
    uart_send(8'hA5, BD, 1);
    check(got.size() == 0 && n_err == 1, "bad stop bit dropped and flagged");

    for (int n = 0; n < 20; n++) begin
      logic [7:0] b, r;
      int len;
      b = 8'($urandom);
      wait (tx_ready); @(posedge clk); #1;
      tx_valid = 1; tx_byte = b;
      @(posedge clk); #1 tx_valid = 0;
      // find the start bit
      len = 0;
      while (txd) begin @(posedge clk); #1; end
      for (int i = 0; i < 10; i++) begin
        logic v;
        int l;
        v = txd; l = 0;
        repeat (BD / 2) @(posedge clk);
        #1;
        if (i >= 1 && i <= 8) r[i-1] = txd;
        if (i == 0) check(txd == 0, "start bit");
        if (i == 9) check(txd == 1, "stop bit");
        repeat (BD - BD / 2) @(posedge clk);
        #1;
      end
      check(r == b, $sformatf("transmitted %h decoded %h", b, r));
    end
    // bit length: count clocks of a 0x00 byte's low run (start + 8 zeros)
    begin
      int low;
      wait (tx_ready); @(posedge clk); #1;
      tx_valid = 1; tx_byte = 8'h00;
      @(posedge clk); #1 tx_valid = 0;
      while (txd) begin @(posedge clk); #1; end
      low = 0;
      while (!txd) begin @(posedge clk); #1; low++; end
      check(low == 9 * BD, $sformatf("9 low bits last %0d clocks, expected %0d", low, 9 * BD));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
