// tb_flash_model: behavioural model of the archiving device's FLASH chip
// (testbench only, not synthesizable logic of the design).
//
// 2**AW words of 16 bits, erased to all ones. A transaction starts when req
// is high, completes LAT clocks later with a one-clock ack. Writes can only
// clear bits (as in a real FLASH); an erase sets a whole 2**SECTOR_AW-word
// sector to ones and is counted per sector.
module tb_flash_model #(
  parameter int AW = 10,
  parameter int SECTOR_AW = 6,
  parameter int LAT = 3
) (
  input  logic              clk,
  input  logic              req,
  input  gts_pkg::fl_op_e   op,
  input  logic [AW-1:0]     addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  output logic              ack
);
  import gts_pkg::*;

  logic [15:0] mem [2**AW];
  int erases [2**(AW-SECTOR_AW)];
  int n_write = 0, n_double_write = 0;
  int state = 0, cnt = 0;
  fl_op_e c_op;
  logic [AW-1:0] c_addr;
  logic [15:0] c_data;

  initial begin
    foreach (mem[i]) mem[i] = '1;
    foreach (erases[i]) erases[i] = 0;
    ack = 0; rdata = 0;
  end

  always @(posedge clk) begin
    case (state)
      0: if (req) begin
           c_op = op; c_addr = addr; c_data = wdata; cnt = LAT; state = 1;
         end
      1: if (cnt > 1) cnt--;
         else begin
           case (c_op)
             FL_READ:  rdata <= mem[c_addr];
             FL_WRITE: begin
               if (mem[c_addr] != 16'hFFFF) n_double_write++;
               mem[c_addr] = mem[c_addr] & c_data;
               n_write++;
             end
             FL_ERASE: begin
               int s;
               s = int'(c_addr >> SECTOR_AW);
               for (int i = 0; i < 2**SECTOR_AW; i++) mem[(s << SECTOR_AW) + i] = '1;
               erases[s]++;
             end
             default: ;
           endcase
           ack <= 1; state = 2;
         end
      default: begin ack <= 0; state = 0; end
    endcase
  end
endmodule
