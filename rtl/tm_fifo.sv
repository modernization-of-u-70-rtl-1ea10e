// tm_fifo: synchronous FIFO for timing messages.
//
// Matches the rate at which a source produces timing messages with the rate
// at which an output network can send them. A write when the FIFO is full
// drops the message and raises the sticky overflow flag (cleared by
// clr_ovf); a read when empty is ignored. rd_data is the head of the queue
// (first-word fall-through), so a read pops the shown word. DEPTH must be a
// power of two. The FIFOs themselves follow the document; their depth and
// the overflow policy are this design's choice.
module tm_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count,
  output logic             overflow,
  input  logic             clr_ovf
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign count   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
      else if (clr_ovf)  overflow <= 1'b0;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("tm_fifo: DEPTH must be a power of two");

endmodule
