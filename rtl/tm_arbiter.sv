// tm_arbiter: merges several timing message FIFOs onto one encoder.
//
// Each input is the head of a FIFO (req = not empty, data = head). When the
// encoder is ready, the arbiter grants the first requesting input at or
// after its round-robin pointer, pops that FIFO (pop is one-hot) and moves
// the pointer past it, so no source can starve another. The output is
// combinational: out_valid/out_tm in the same clock as the request. The
// document shows the FIFOs joined onto one encoder; the round-robin order
// is this design's choice.
module tm_arbiter
  import gts_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  tm_t          data [N],
  output logic [N-1:0] pop,
  output logic         out_valid,
  output tm_t          out_tm,
  input  logic         out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr, sel;
  logic          found;

  always_comb begin
    found = 1'b0;
    sel   = ptr;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!found && req[idx]) begin
        found = 1'b1;
        sel   = IW'(idx);
      end
    end
  end

  assign out_valid = found;
  assign out_tm    = data[sel];

  always_comb begin
    pop = '0;
    if (found && out_ready) pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (found && out_ready) ptr <= (int'(sel) == N - 1) ? '0 : sel + 1'b1;
  end

endmodule
