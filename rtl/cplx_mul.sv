// cplx_mul: one complex multiplier ("CM" in the processing-element banks).
//
// Combinational. Multiplies a butterfly-width sample x by a Q1.15
// coefficient w (a twiddle factor, or the radix-3 constant -j*sqrt(3)/2) and
// rounds the product back to Q.0: y = round((x * w) / 2^15). Four real
// multipliers and two adders; the result is not saturated, since |w| <= 1
// keeps it within the butterfly width.
module cplx_mul
  import fft_pkg::*;
(
  input  cplxw_t x,
  input  cplx_t  w,
  output cplxw_t y
);
  localparam int unsigned PW = WW + DW + 1;
  logic signed [PW-1:0] pr, pi;

  always_comb begin
    pr = PW'(x.re) * PW'(w.re) - PW'(x.im) * PW'(w.im);
    pi = PW'(x.re) * PW'(w.im) + PW'(x.im) * PW'(w.re);
    pr = (pr + PW'(1 << 14)) >>> 15;
    pi = (pi + PW'(1 << 14)) >>> 15;
    y.re = pr[WW-1:0];
    y.im = pi[WW-1:0];
  end
endmodule
