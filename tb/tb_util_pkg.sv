// tb_util_pkg: reference functions for the GTS testbenches.
//
// ref_halfbits builds the 40 half-bit levels of a MIL-STD-1553 word from
// first principles (count of ones for the parity, explicit sync levels),
// independently of the design package, so that testbenches can drive and
// check lines against it. bad_par inverts the parity bit, bad_code breaks
// the Manchester coding of bit 7.
package tb_util_pkg;

  function automatic logic [39:0] ref_halfbits(logic [15:0] w, bit cmd,
                                               bit bad_par = 0, bit bad_code = 0);
    logic [39:0] p;
    int k;
    bit par;
    k = 39;
    for (int i = 0; i < 6; i++) begin
      p[k] = cmd ? (i < 3) : (i >= 3);
      k--;
    end
    for (int b = 15; b >= 0; b--) begin
      p[k]   = w[b];
      p[k-1] = !w[b];
      if (bad_code && b == 7) p[k-1] = w[b];
      k -= 2;
    end
    par = ($countones(w) % 2 == 0);
    if (bad_par) par = !par;
    p[1] = par;
    p[0] = !par;
    return p;
  endfunction

endpackage
