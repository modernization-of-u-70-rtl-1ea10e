// tb_tma_mem_dispatcher: checks the memory dispatcher with FLASH and FRAM
// models, on a small FLASH (1024 words, 64-word sectors, 204 records).
//
// Writes batches of stamped messages and flushes them; checks each record's
// five words in the FLASH, the write pointer saved in the FRAM after every
// flush, the task code saved when it changes, that the ring wraps (every
// sector erased once per turn and no cell written twice without an erase),
// that a transfer streams the count and then the records oldest first
// (before and after the wrap), and that after a reset the pointer is
// restored from the FRAM and filling goes on where it stopped.
module tb_tma_mem_dispatcher;
  import gts_pkg::*;

  localparam int FAW = 10, SAW = 6, RAW = 12, BD = 16;
  localparam int NREC = (2**FAW) / 5;

  logic clk = 0, rst_n = 1;
  logic tm_valid = 0, flush = 0, xfer_start = 0, out_ready = 0;
  tm_t tm = '0;
  logic [31:0] now_sec = 32'd500;
  logic [15:0] now_sub = 16'd0;
  task_e task_code = TASK_ARCHIVE;
  logic buf_ovf, ready, flushing, out_valid, out_last, wrapped_out;
  logic [31:0] wp_out;
  word_t out_word;
  logic fl_req, fl_ack, fr_req, fr_we, fr_ack;
  fl_op_e fl_op;
  logic [FAW-1:0] fl_addr;
  word_t fl_wdata, fl_rdata, fr_wdata, fr_rdata;
  logic [RAW-1:0] fr_addr;
  int checks = 0, failures = 0;

  tma_mem_dispatcher #(.FLASH_AW(FAW), .SECTOR_AW(SAW), .FRAM_AW(RAW), .BUF_DEPTH(BD)) dut (.*);
  tb_flash_model #(.AW(FAW), .SECTOR_AW(SAW), .LAT(3)) flash (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .rdata(fl_rdata), .ack(fl_ack));
  tb_fram_model #(.AW(RAW)) fram (
    .clk, .req(fr_req), .we(fr_we), .addr(fr_addr), .wdata(fr_wdata), .rdata(fr_rdata), .ack(fr_ack));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference archive: record number n is stored in slot n % NREC.
  logic [79:0] ref_rec [$];
  int n_sent = 0;

  task automatic put_batch(int n);
    for (int i = 0; i < n; i++) begin
      tm = '{cw: 16'(n_sent), dw: 16'($urandom)};
      now_sub = 16'($urandom_range(0, 9999));
      ref_rec.push_back({now_sec, now_sub, tm.cw, tm.dw});
      n_sent++;
      tm_valid = 1; @(posedge clk); #1 tm_valid = 0;
    end
    flush = 1; @(posedge clk); #1 flush = 0;
    repeat (3) @(posedge clk); #1;
    wait (ready); @(posedge clk); #1;
    now_sec++;
  endtask

  function automatic logic [79:0] flash_rec(int slot);
    return {flash.mem[slot*5], flash.mem[slot*5+1], flash.mem[slot*5+2], flash.mem[slot*5+3], flash.mem[slot*5+4]};
  endfunction

  task automatic check_transfer();
    word_t words [$];
    int oldest, n;
    xfer_start = 1; @(posedge clk); #1 xfer_start = 0;
    forever begin
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        words.push_back(out_word);
        if (out_last) break;
      end
      #1;
    end
    #1 out_ready = 0;
    n = (n_sent >= NREC) ? NREC : n_sent;
    check(words.size() == 2 + 5 * n, $sformatf("transfer of %0d words, expected %0d", words.size(), 2 + 5 * n));
    check({words[0], words[1]} == 32'(n), "record count");
    oldest = (n_sent >= NREC) ? n_sent % NREC : 0;
    for (int r = 0; r < n && 2 + 5*r + 4 < words.size(); r++) begin
      int slot;
      logic [79:0] got;
      slot = (oldest + r) % NREC;
      got = {words[2+5*r], words[3+5*r], words[4+5*r], words[5+5*r], words[6+5*r]};
      if (n_sent >= NREC && slot >= n_sent % NREC && ((slot*5) >> SAW) == (((n_sent % NREC)*5) >> SAW)) begin
        // erased ahead of the pointer in the current sector, or old
        check(got == '1 || got == ref_rec[n_sent - NREC + r], $sformatf("slot %0d erased or old", slot));
      end else begin
        check(got == ref_rec[n_sent - n + r], $sformatf("transfer record %0d (slot %0d)", r, slot));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (ready); @(posedge clk); #1;
    check(wp_out == 0 && !wrapped_out, "blank FRAM restores pointer 0");

    // First batches.
    for (int b = 0; b < 5; b++) put_batch(BD - 3);
    for (int i = 0; i < n_sent; i++) check(flash_rec(i) == ref_rec[i], $sformatf("record %0d in FLASH", i));
    check({fram.mem[0], fram.mem[1]} == 32'(n_sent) && fram.mem[2] == 0, "pointer saved in FRAM");
    check(wp_out == n_sent, "write pointer");
    check_transfer();

    // Task code saved when it changes.
    task_code = TASK_TRANSFER;
    repeat (10) @(posedge clk); #1;
    check(fram.mem[3] == 16'(TASK_TRANSFER), "task code saved");
    task_code = TASK_ARCHIVE;
    repeat (10) @(posedge clk); #1;

    // Reset and restore.
    rst_n = 0; #1 rst_n = 1;
    wait (ready); @(posedge clk); #1;
    check(wp_out == n_sent, $sformatf("pointer %0d restored after reset", wp_out));

    // Fill past the end of the ring.
    while (n_sent < NREC + 40) put_batch(BD);
    check(wrapped_out && {fram.mem[0], fram.mem[1]} == 32'(n_sent % NREC) && fram.mem[2] == 1, "wrapped pointer saved");
    for (int s = 0; s < 2**(FAW-SAW); s++) begin
      int exp_e;
      exp_e = (s * 2**SAW < (n_sent % NREC) * 5) ? 2 : 1;
      if (s * 2**SAW >= NREC * 5) exp_e = 0;
      check(flash.erases[s] == exp_e, $sformatf("sector %0d erased %0d times, expected %0d", s, flash.erases[s], exp_e));
    end
    check(flash.n_double_write == 0, "no cell written twice without erase");
    for (int i = NREC; i < n_sent; i++) check(flash_rec(i % NREC) == ref_rec[i], $sformatf("record %0d after wrap", i));
    check_transfer();

    // Buffer overflow.
    for (int i = 0; i < BD + 2; i++) begin
      tm_valid = 1; @(posedge clk); #1 tm_valid = 0;
    end
    check(buf_ovf, "buffer overflow flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
