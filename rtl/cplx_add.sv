// cplx_add: one complex adder ("CA" in the processing-element banks).
//
// Combinational. Computes a + b, or a - b when sub is set, on the
// butterfly-internal width. Callers keep their operands small enough that the
// result fits (at most three 16-bit samples are ever summed), so no
// saturation is applied here.
module cplx_add
  import fft_pkg::*;
(
  input  cplxw_t a,
  input  cplxw_t b,
  input  logic   sub,
  output cplxw_t y
);
  always_comb begin
    if (sub) begin
      y.re = a.re - b.re;
      y.im = a.im - b.im;
    end else begin
      y.re = a.re + b.re;
      y.im = a.im + b.im;
    end
  end
endmodule
