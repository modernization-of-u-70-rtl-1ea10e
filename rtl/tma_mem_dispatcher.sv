// tma_mem_dispatcher: memory dispatcher of the TM archiving device.
//
// Each timing message offered on tm_valid is stamped with the current time
// from the RTC dispatcher (now_sec, now_sub) and the record (arch_rec_t)
// enters a buffer FIFO (BUF_DEPTH records). On flush (the task administrator asks for one every
// 10 s) the buffer is copied into the FLASH, five 16-bit words per record,
// in an endless ring: the record index wraps to zero after the last whole
// record, so every cell is written once per turn of the ring. Before the
// first word of each FLASH sector is written the sector is erased. When a
// flush is over, the FLASH write pointer (record index, two words) and the
// wrap flag are written to the FRAM, and so is the code of the current task
// whenever it changes, so that after a power cut the device resumes where
// it stopped: at reset the dispatcher reads the pointer back from the FRAM
// before doing anything else.
//
// On xfer_start the dispatcher streams the archive on out_word/out_valid/
// out_ready: two words with the number of records that follow, then the
// records from the oldest slot to the newest. After a wrap the whole ring
// is sent starting at the write pointer; slots erased ahead of the pointer
// read as all ones. out_last marks the final word.
//
// FLASH port: fl_req held until fl_ack, fl_op = read, write or sector
// erase, 16-bit words at fl_addr. FRAM port: the same handshake, fr_we
// selects a write. FRAM words: 0-1 record index (high, low), 2 wrap flag,
// 3 current task code.
//
// The buffer FIFO, the ring filling, and the saving of the FLASH address in
// the FRAM after each portion follow the document; the record layout, the
// erase-ahead rule, the FRAM layout and the transfer format are this
// design's choices.
module tma_mem_dispatcher
  import gts_pkg::*;
#(
  parameter int unsigned FLASH_AW  = 21,    // 2**21 x 16 bit = 32 Mbit
  parameter int unsigned SECTOR_AW = 15,    // 32 Kword (64 KB) erase sectors
  parameter int unsigned FRAM_AW   = 12,    // 2**12 x 16 bit = 64 Kbit
  parameter int unsigned BUF_DEPTH = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  // messages in, time from the RTC dispatcher
  input  logic                tm_valid,
  input  tm_t                 tm,
  input  logic [31:0]         now_sec,
  input  logic [15:0]         now_sub,
  output logic                buf_ovf,
  // control
  input  logic                flush,
  input  logic                xfer_start,
  input  task_e               task_code,
  output logic                ready,        // restored from FRAM and idle
  output logic                flushing,
  output logic [31:0]         wp_out,       // FLASH write pointer, records
  output logic                wrapped_out,
  // transfer stream
  output logic                out_valid,
  output word_t               out_word,
  output logic                out_last,
  input  logic                out_ready,
  // FLASH
  output logic                fl_req,
  output fl_op_e              fl_op,
  output logic [FLASH_AW-1:0] fl_addr,
  output word_t               fl_wdata,
  input  word_t               fl_rdata,
  input  logic                fl_ack,
  // FRAM
  output logic                fr_req,
  output logic                fr_we,
  output logic [FRAM_AW-1:0]  fr_addr,
  output word_t               fr_wdata,
  input  word_t               fr_rdata,
  input  logic                fr_ack
);

  localparam int unsigned N_REC = (2**FLASH_AW) / REC_WORDS;

  // Buffer FIFO.
  logic      b_pop, b_empty, b_full, unused_clr;
  arch_rec_t b_head;
  logic [$clog2(BUF_DEPTH):0] b_count;
  assign unused_clr = 1'b0;

  tm_fifo #(.WIDTH($bits(arch_rec_t)), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(tm_valid), .wr_data(arch_rec_t'{sec: now_sec, sub: now_sub, cw: tm.cw, dw: tm.dw}),
    .rd_en(b_pop), .rd_data(b_head),
    .empty(b_empty), .full(b_full), .count(b_count),
    .overflow(buf_ovf), .clr_ovf(unused_clr)
  );

  typedef enum logic [4:0] {
    S_RST0, S_RST1, S_RST2, S_IDLE,
    S_FL_LOAD, S_FL_ERASE, S_FL_WRITE, S_SAVE0, S_SAVE1, S_SAVE2, S_TASK,
    S_X_HI, S_X_LO, S_X_READ, S_X_OUT
  } state_e;
  state_e state;

  logic [31:0]          wp, xr, xleft;
  logic                 wrapped;
  logic [2:0]           k;               // word within a record
  logic [79:0]          hold;
  logic [FLASH_AW-1:0]  waddr;
  task_e                task_saved;
  logic                 flush_pend, xfer_pend;
  word_t                x_word;
  logic                 x_last;

  assign wp_out      = wp;
  assign wrapped_out = wrapped;
  assign ready       = (state == S_IDLE);
  assign flushing    = (state inside {S_FL_LOAD, S_FL_ERASE, S_FL_WRITE, S_SAVE0, S_SAVE1, S_SAVE2});
  assign b_pop       = (state == S_FL_LOAD) && !b_empty;
  assign out_valid   = (state inside {S_X_HI, S_X_LO, S_X_OUT});
  assign out_last    = ((state == S_X_OUT) && x_last) || ((state == S_X_LO) && xleft == 0);

  function automatic logic [FLASH_AW-1:0] word_addr(logic [31:0] r, logic [2:0] w);
    return FLASH_AW'(r * REC_WORDS + 32'(w));
  endfunction

  function automatic logic [31:0] next_rec(logic [31:0] r);
    return (r == N_REC - 1) ? '0 : r + 1;
  endfunction

  always_comb begin
    out_word = x_word;
    if (state == S_X_HI) out_word = xleft[31:16];
    if (state == S_X_LO) out_word = xleft[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RST0;
      wp <= '0; wrapped <= 1'b0; k <= '0; hold <= '0; waddr <= '0;
      xr <= '0; xleft <= '0; x_word <= '0; x_last <= 1'b0;
      task_saved <= TASK_ARCHIVE; flush_pend <= 1'b0; xfer_pend <= 1'b0;
      fl_req <= 1'b0; fl_op <= FL_READ; fl_addr <= '0; fl_wdata <= '0;
      fr_req <= 1'b0; fr_we <= 1'b0; fr_addr <= '0; fr_wdata <= '0;
    end else begin
      if (flush)      flush_pend <= 1'b1;
      if (xfer_start) xfer_pend  <= 1'b1;

      unique case (state)
        // Restore the write pointer from the FRAM.
        S_RST0: if (!fr_req) begin
                  fr_req <= 1'b1; fr_we <= 1'b0; fr_addr <= FRAM_AW'(0);
                end else if (fr_ack) begin
                  fr_req <= 1'b0; wp[31:16] <= fr_rdata; state <= S_RST1;
                end
        S_RST1: if (!fr_req) begin
                  fr_req <= 1'b1; fr_addr <= FRAM_AW'(1);
                end else if (fr_ack) begin
                  fr_req <= 1'b0; wp[15:0] <= fr_rdata; state <= S_RST2;
                end
        S_RST2: if (!fr_req) begin
                  fr_req <= 1'b1; fr_addr <= FRAM_AW'(2);
                end else if (fr_ack) begin
                  fr_req  <= 1'b0;
                  wrapped <= fr_rdata[0];
                  if (wp >= N_REC) begin     // blank or corrupted FRAM
                    wp <= '0; wrapped <= 1'b0;
                  end
                  state <= S_IDLE;
                end

        S_IDLE: begin
          if (task_code != task_saved) begin
            fr_req <= 1'b1; fr_we <= 1'b1; fr_addr <= FRAM_AW'(3);
            fr_wdata <= 16'(task_code);
            task_saved <= task_code;
            state <= S_TASK;
          end else if (flush_pend) begin
            flush_pend <= 1'b0;
            state <= S_FL_LOAD;
          end else if (xfer_pend) begin
            xfer_pend <= 1'b0;
            xleft <= wrapped ? N_REC : wp;
            xr    <= wrapped ? wp : '0;
            k     <= '0;
            state <= S_X_HI;
          end
        end

        S_TASK: if (fr_ack) begin
                  fr_req <= 1'b0; fr_we <= 1'b0; state <= S_IDLE;
                end

        // Flush: one record after the other, then save the pointer.
        S_FL_LOAD: begin
          if (b_empty) begin
            fr_req <= 1'b1; fr_we <= 1'b1; fr_addr <= FRAM_AW'(0); fr_wdata <= wp[31:16];
            state <= S_SAVE0;
          end else begin
            hold  <= b_head;
            k     <= '0;
            waddr <= word_addr(wp, 3'd0);
            state <= S_FL_ERASE;
          end
        end
        S_FL_ERASE: begin
          if (waddr[SECTOR_AW-1:0] == '0) begin
            if (!fl_req) begin
              fl_req <= 1'b1; fl_op <= FL_ERASE; fl_addr <= waddr;
            end else if (fl_ack) begin
              fl_req <= 1'b0;
              fl_req <= 1'b1; fl_op <= FL_WRITE; fl_addr <= waddr; fl_wdata <= hold[79:64];
              state  <= S_FL_WRITE;
            end
          end else begin
            fl_req <= 1'b1; fl_op <= FL_WRITE; fl_addr <= waddr; fl_wdata <= hold[79:64];
            state  <= S_FL_WRITE;
          end
        end
        S_FL_WRITE: if (fl_ack) begin
          fl_req <= 1'b0;
          hold   <= {hold[63:0], 16'h0000};
          if (k == 3'(REC_WORDS - 1)) begin
            wp <= next_rec(wp);
            if (wp == N_REC - 1) wrapped <= 1'b1;
            state <= S_FL_LOAD;
          end else begin
            k     <= k + 1'b1;
            waddr <= waddr + 1'b1;
            state <= S_FL_ERASE;
          end
        end
        S_SAVE0: if (fr_ack) begin
                   fr_addr <= FRAM_AW'(1); fr_wdata <= wp[15:0]; state <= S_SAVE1;
                 end
        S_SAVE1: if (fr_ack) begin
                   fr_addr <= FRAM_AW'(2); fr_wdata <= 16'(wrapped); state <= S_SAVE2;
                 end
        S_SAVE2: if (fr_ack) begin
                   fr_req <= 1'b0; fr_we <= 1'b0; state <= S_IDLE;
                 end

        // Transfer: count, then every record slot from the oldest.
        S_X_HI: if (out_ready) state <= S_X_LO;
        S_X_LO: if (out_ready) begin
                  if (xleft == 0) state <= S_IDLE;
                  else begin
                    fl_req <= 1'b1; fl_op <= FL_READ; fl_addr <= word_addr(xr, 3'd0);
                    state  <= S_X_READ;
                  end
                end
        S_X_READ: if (fl_ack) begin
                    fl_req <= 1'b0;
                    x_word <= fl_rdata;
                    x_last <= (xleft == 1) && (k == 3'(REC_WORDS - 1));
                    state  <= S_X_OUT;
                  end
        S_X_OUT: if (out_ready) begin
                   if (x_last) begin
                     state <= S_IDLE;
                   end else begin
                     if (k == 3'(REC_WORDS - 1)) begin
                       k     <= '0;
                       xr    <= next_rec(xr);
                       xleft <= xleft - 1;
                       fl_addr <= word_addr(next_rec(xr), 3'd0);
                     end else begin
                       k       <= k + 1'b1;
                       fl_addr <= fl_addr + 1'b1;
                     end
                     fl_req <= 1'b1; fl_op <= FL_READ;
                     state  <= S_X_READ;
                   end
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
