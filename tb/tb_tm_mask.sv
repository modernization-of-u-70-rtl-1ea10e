// tb_tm_mask: checks the masked gate against a reference mask.
//
// Writes random mask bits, keeps a copy in the testbench, and offers
// random messages: each must pass (out_valid, unchanged message) exactly
// when its event bit is open, and blocked must flag the others. Also
// checks that the mask is all closed after reset.
module tb_tm_mask;
  import gts_pkg::*;

  logic clk = 0, rst_n = 1;
  logic mask_we = 0, mask_bit = 0, in_valid = 0;
  event_t mask_addr = '0;
  tm_t in_tm = '0, out_tm;
  logic out_valid, blocked;
  bit ref_mask [256];
  int checks = 0, failures = 0;

  tm_mask dut (.*);

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
    foreach (ref_mask[i]) ref_mask[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int e = 0; e < 256; e += 17) begin
      in_valid = 1; in_tm = '{cw: {8'h5A, 8'(e)}, dw: 16'h1234};
      #1 check(!out_valid && blocked, "closed after reset");
    end
    in_valid = 0;
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 40; k++) begin
        @(posedge clk); #1;
        mask_we = 1; mask_addr = 8'($urandom); mask_bit = 1'($urandom);
        ref_mask[mask_addr] = mask_bit;
      end
      @(posedge clk); #1 mask_we = 0;
      for (int k = 0; k < 100; k++) begin
        in_tm = '{cw: 16'($urandom), dw: 16'($urandom)};
        in_valid = 1'($urandom);
        #1;
        check(out_valid == (in_valid && ref_mask[in_tm.cw[7:0]]), $sformatf("gate for event %0d", in_tm.cw[7:0]));
        check(blocked == (in_valid && !ref_mask[in_tm.cw[7:0]]), "blocked flag");
        if (out_valid) check(out_tm == in_tm, "message unchanged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
