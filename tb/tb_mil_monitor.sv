// tb_mil_monitor: behavioural line monitor for testbenches.
//
// Watches a {act, lvl} line, samples each half-bit in its middle from the
// start of a burst and rebuilds the Command/Data Word pairs with plain
// loops, independently of the design's decoder. Every complete message is
// pushed with its arrival clock (the clock of its last half-bit sample)
// into the queues got / t_got; bad counts bursts that were not a clean
// Command Word + Data Word pair with correct sync, coding and parity.
module tb_mil_monitor #(
  parameter int HB = 6
) (
  input logic                clk,
  input gts_pkg::mil_line_t  line
);
  import gts_pkg::*;

  tm_t    got   [$];
  longint t_got [$];
  int     bad = 0;
  longint cyc = 0;

  always @(posedge clk) cyc++;

  function automatic bit word_of(logic [39:0] p, bit cmd, output logic [15:0] w);
    bit ok;
    ok = cmd ? (p[39:34] == 6'b111000) : (p[39:34] == 6'b000111);
    for (int b = 0; b < 17; b++) begin
      logic hi, lo;
      hi = p[33 - 2*b]; lo = p[32 - 2*b];
      if (hi == lo) ok = 0;
      if (b < 16) w[15 - b] = hi;
    end
    if (($countones(w) + p[1]) % 2 != 1) ok = 0;
    return ok;
  endfunction

  initial begin
    forever begin
      logic [79:0] p;
      int n;
      @(posedge clk);
      if (line.act) begin
        n = 0;
        repeat (HB / 2) @(posedge clk);
        while (line.act && n < 80) begin
          p[79 - n] = line.lvl;
          n++;
          if (n < 80) repeat (HB) @(posedge clk);
        end
        if (n == 80) begin
          logic [15:0] c, d;
          bit ok;
          ok = word_of(p[79:40], 1, c);
          ok = word_of(p[39:0], 0, d) && ok;
          if (ok) begin
            got.push_back('{cw: c, dw: d});
            t_got.push_back(cyc);
          end else bad++;
        end else bad++;
        while (line.act) @(posedge clk);
      end
    end
  end
endmodule
