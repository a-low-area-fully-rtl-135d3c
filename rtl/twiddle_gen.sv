// twiddle_gen: one twiddle factor W_L^e = cos(2*pi*e/L) - j*sin(2*pi*e/L),
// for any block length L = 2^la * 3^lb of the supported FFT sizes.
//
// Combinational. The angle is first formed as a 32-bit fraction of a turn,
// angle = e * 2^32 / L, without a divider: 2^40 / 3^lb is a small table of six
// constants, so angle = (e * round(2^40 / 3^lb)) >> (8 + la). The top two bits
// of the angle pick the quadrant; the remaining quarter turn is rotated by an
// unrolled 20-step CORDIC (z in turn units, x started at the CORDIC gain
// 0.60725 so that no final scaling is needed). The result is Q1.15, +1.0
// saturated to 32767. The document names a twiddle-factor unit but does not
// say how it works; CORDIC is this design's choice, picked because the
// 32 transform sizes have no common power-of-two period for a single ROM.
module twiddle_gen
  import fft_pkg::*;
(
  input  tw_req_t req,
  output cplx_t   w
);
  localparam int unsigned NIT = 20;
  localparam int unsigned XW  = 26;   // CORDIC x/y width, 22 fraction bits

  // round(2^40 / 3^b), b = 0..5
  function automatic logic [40:0] recip3(logic [2:0] b);
    case (b)
      3'd0:    return 41'd1099511627776;
      3'd1:    return 41'd366503875925;
      3'd2:    return 41'd122167958642;
      3'd3:    return 41'd40722652881;
      3'd4:    return 41'd13574217627;
      default: return 41'd4524739209;
    endcase
  endfunction

  // atan(2^-i) / (2*pi) * 2^32, i = 0 .. NIT-1
  localparam logic [31:0] ATAN_TURN [NIT] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465,  32'd10679838,  32'd5340245,   32'd2670163,  32'd1335087,
    32'd667544,    32'd333772,    32'd166886,    32'd83443,    32'd41722,
    32'd20861,     32'd10430,     32'd5215,      32'd2608,     32'd1304
  };

  function automatic logic signed [DW-1:0] to_q15(logic signed [XW-1:0] v);
    logic signed [XW-1:0] r;
    r = (v + XW'(1 << 6)) >>> 7;
    if (r > XW'(32767))       return 16'sd32767;
    else if (r < -XW'(32768)) return -16'sd32768;
    else                      return r[DW-1:0];
  endfunction

  logic [52:0]          prod;
  logic [31:0]          angle;
  logic [1:0]           quad;
  logic signed [XW-1:0] x, y, xn, yn;
  logic signed [33:0]   z;
  logic signed [DW-1:0] c, s;

  always_comb begin
    prod  = 53'(req.e) * 53'(recip3(req.lb));
    angle = 32'(prod >> (8 + req.la));
    quad  = angle[31:30];
    x     = XW'(2547003);                 // 0.6072529 * 2^22
    y     = '0;
    z     = 34'(angle[29:0]);
    for (int unsigned i = 0; i < NIT; i++) begin
      if (!z[33]) begin
        xn = x - (y >>> i);
        yn = y + (x >>> i);
        z  = z - 34'(ATAN_TURN[i]);
      end else begin
        xn = x + (y >>> i);
        yn = y - (x >>> i);
        z  = z + 34'(ATAN_TURN[i]);
      end
      x = xn;
      y = yn;
    end
    c = to_q15(x);
    s = to_q15(y);
    // rotate by the quadrant; W = cos(theta) - j sin(theta)
    case (quad)
      2'd0:    begin w.re =  c; w.im = -s; end
      2'd1:    begin w.re = -s; w.im = -c; end
      2'd2:    begin w.re = -c; w.im =  s; end
      default: begin w.re =  s; w.im =  c; end
    endcase
  end
endmodule
