// tb_fram_model: behavioural model of the archiving device's FRAM chip
// (testbench only). 2**AW words of 16 bits, one-clock latency, ack for one
// clock; a transaction starts when req is high.
module tb_fram_model #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  output logic          ack
);
  logic [15:0] mem [2**AW];
  int state = 0, n_write = 0;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    ack = 0; rdata = 0;
  end

  always @(posedge clk) begin
    case (state)
      0: if (req) begin
           if (we) begin mem[addr] = wdata; n_write++; end
           else rdata <= mem[addr];
           ack <= 1; state = 1;
         end
      default: begin ack <= 0; state = 0; end
    endcase
  end
endmodule
