// tm_mask: masked gate for timing messages.
//
// A mask register holds one bit per event code. A message offered on
// in_valid is passed to out_valid in the same clock when the bit of its
// event code is set (gate open) and dropped otherwise; the message itself
// goes through unchanged. The register is written one bit at a time by the
// host (mask_we, mask_addr = event code, mask_bit) and is all closed after
// reset. In a timing message generator the same mechanism keeps a global
// message from circulating round the ring: the generator that sent it keeps
// its own codes closed in its global-to-global gate.
//
// The masked gates and their use against endless circulation follow the
// document; the bit-per-event organisation and the write port are this
// design's choice.
module tm_mask
  import gts_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   mask_we,
  input  event_t mask_addr,
  input  logic   mask_bit,
  input  logic   in_valid,
  input  tm_t    in_tm,
  output logic   out_valid,
  output tm_t    out_tm,
  output logic   blocked      // pulse: a message was stopped by the mask
);

  logic [N_EVENTS-1:0] mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       mask <= '0;
    else if (mask_we) mask[mask_addr] <= mask_bit;
  end

  assign out_valid = in_valid &&  mask[event_of(in_tm)];
  assign blocked   = in_valid && !mask[event_of(in_tm)];
  assign out_tm    = in_tm;

endmodule
