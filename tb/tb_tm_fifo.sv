// tb_tm_fifo: checks the FIFO against a queue model.
//
// Random writes and reads, including writes when full and reads when
// empty. Checks the head word, empty/full/count against the model, that a
// write when full sets the sticky overflow flag and is dropped, and that
// clr_ovf clears the flag.
module tb_tm_fifo;
  localparam int W = 32, D = 16;

  logic clk = 0, rst_n = 1;
  logic wr_en = 0, rd_en = 0, clr_ovf = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  logic [W-1:0] q [$];
  bit exp_ovf = 0;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  tm_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 30 : 70;   // alternately fill and drain
      wr_en = ($urandom_range(0, 99) < bias);
      rd_en = ($urandom_range(0, 99) < 100 - bias);
      clr_ovf = ($urandom_range(0, 99) < 2);
      wr_data = $urandom;
      #1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(count == q.size(), "count");
      check(overflow == exp_ovf, "overflow flag");
      if (q.size() > 0) check(rd_data == q[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && q.size() + (rd_en && !empty ? 1 : 0) <= D && !full) q.push_back(wr_data);
      if (wr_en && full) exp_ovf = 1;
      else if (clr_ovf) exp_ovf = 0;
      #1;
    end
    check(n_full > 0 && n_empty > 0, "both full and empty were reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
