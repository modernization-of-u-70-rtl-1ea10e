// tb_tmg_local_src: checks the local event source.
//
// Loads a code per channel, then fires single pulses and groups of
// simultaneous pulses. Every pulse must produce exactly one message with
// that channel's code and the operational data word, groups must leave in
// channel order on consecutive clocks, and a single pulse must produce its
// message on out_valid after the third clock edge, seen by the
// monitor at the fourth. A second pulse on a channel whose
// first one is still pending must set the lost flag.
module tb_tmg_local_src;
  import gts_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] local_pulse = '0;
  logic code_we = 0;
  logic [$clog2(N)-1:0] code_addr = '0;
  word_t code_data = '0, opdata = 16'hC0DE;
  logic out_valid, lost;
  tm_t out_tm;
  word_t codes [N];
  int checks = 0, failures = 0;

  tmg_local_src #(.N_LOCAL(N)) dut (.*);

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

  // Collect outputs.
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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      codes[i] = 16'($urandom);
      code_we = 1; code_addr = 3'(i); code_data = codes[i];
      @(posedge clk); #1;
    end
    code_we = 0;
    check(!lost, "no loss after reset");
    // single pulses
    for (int i = 0; i < N; i++) begin
      int t0;
      got.delete(); got_t.delete();
      local_pulse[i] = 1; t0 = cyc;
      repeat (3) @(posedge clk); #1 local_pulse[i] = 0;
      repeat (10) @(posedge clk); #1;
      check(got.size() == 1 && got[0] == codes[i], $sformatf("channel %0d code", i));
      if (got.size() == 1) check(got_t[0] - t0 == 4, $sformatf("channel %0d latency %0d", i, got_t[0] - t0));
    end
    // groups
    for (int r = 0; r < 30; r++) begin
      logic [N-1:0] m;
      int k;
      m = N'($urandom) | 1'b1 << $urandom_range(0, N-1);
      got.delete(); got_t.delete();
      local_pulse = m;
      repeat (2) @(posedge clk); #1 local_pulse = '0;
      repeat (20) @(posedge clk); #1;
      k = 0;
      check(got.size() == $countones(m), $sformatf("group %b: %0d messages", m, got.size()));
      for (int i = 0; i < N; i++) if (m[i] && k < got.size()) begin
        check(got[k] == codes[i], $sformatf("group %b order at channel %0d", m, i));
        if (k > 0) check(got_t[k] == got_t[k-1] + 1, "consecutive clocks");
        k++;
      end
    end
    check(!lost, "no loss in groups");
    // a pulse on a pending channel: fire all, then channel 7 again at once
    local_pulse = '1;
    @(posedge clk); #1 local_pulse = '0;
    @(posedge clk); #1 local_pulse[7] = 1;
    repeat (2) @(posedge clk); #1 local_pulse = '0;
    repeat (20) @(posedge clk); #1;
    check(lost, "lost flag set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
