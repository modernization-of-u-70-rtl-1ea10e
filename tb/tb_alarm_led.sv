// tb_alarm_led: checks the LED hold time of alarm_led.
//
// With HOLD = 50 clocks and four channels, drives single-clock pulses,
// long levels and pulses that retrigger during the hold. A reference model
// in the testbench (the clock of the last alarm on each channel) predicts
// every LED on every clock: lit from the first clock edge that sees the
// alarm until HOLD edges after the last one, dark otherwise; channels are
// independent.
module tb_alarm_led;
  localparam int N = 4, HOLD = 50;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] alarm = '0, led;
  int checks = 0, failures = 0;

  alarm_led #(.N(N), .HOLD(HOLD)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: number of the last clock edge at which each alarm was
  // high; after edge c the LED must be lit exactly when c - last <= HOLD.
  // Checked at the falling edge, when the registered LEDs are stable.
  longint cyc = 0;
  longint last [N];
  bit started = 0;
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) if (alarm[i]) last[i] = cyc;
  end
  always @(negedge clk) begin
    if (started) begin
      for (int i = 0; i < N; i++) begin
        bit exp;
        exp = (last[i] >= 0) && (cyc - last[i] <= HOLD);
        check(led[i] == exp, $sformatf("channel %0d at clock %0d: led %0d, expected %0d", i, cyc, led[i], exp));
      end
    end
  end

  initial begin
    foreach (last[i]) last[i] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    started = 1;
    for (int n = 0; n < 60; n++) begin
      int gap;
      alarm[$urandom_range(0, N - 1)] = 1;
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #1 alarm = '0;
      gap = (n % 3 == 0) ? $urandom_range(HOLD - 5, HOLD + 20) : $urandom_range(1, 2 * HOLD);
      repeat (gap) @(posedge clk);
      #1;
    end
    repeat (2 * HOLD) @(posedge clk); #1;
    check(led == '0, "all LEDs dark at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
