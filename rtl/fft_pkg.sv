// fft_pkg: types and constants shared by the reconfigurable mixed-radix FFT.
//
// Samples are complex fixed-point numbers with 16-bit signed real and
// imaginary parts (one 32-bit word per sample, the word width of the FIFO
// bank memories). Inside a butterfly the arithmetic runs two bits wider so
// that a radix-3 sum cannot overflow before it is scaled back to 16 bits.
//
// The size of a transform is N = 2^X * 3^Y (X = 2..11, Y = 0..5, N <= 2048,
// 32 sizes in all). Each of the four super stages runs one of six radix
// configurations, or passes its data through when the transform needs fewer
// than four super stages (the pass-through mode is this design's addition).
package fft_pkg;

  localparam int unsigned DW      = 16;   // bits per real/imaginary part
  localparam int unsigned WW      = 18;   // butterfly-internal width
  localparam int unsigned NMAX    = 2048; // largest transform
  localparam int unsigned CW      = 12;   // counters and strides, up to 3*D <= 2048
  localparam int unsigned NSTAGE  = 4;    // super stages
  localparam int unsigned MCH     = 4;    // FIFO chains per super stage (largest m)
  localparam int unsigned NCHAIN  = NSTAGE * MCH;

  // -j*sqrt(3)/2 in Q1.15, the constant of the radix-3 butterfly
  localparam logic signed [DW-1:0] SQRT3_2 = 16'sd28378;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [WW-1:0] re;
    logic signed [WW-1:0] im;
  } cplxw_t;

  // Radix configuration of one super stage (Fig. 3 of the architecture).
  typedef enum logic [2:0] {
    M_2S_R3 = 3'd0,  // two radix-3 stages
    M_R3_R2 = 3'd1,  // one radix-3 stage followed by one radix-2 stage
    M_3S_R2 = 3'd2,  // three radix-2 stages
    M_2S_R2 = 3'd3,  // two radix-2 stages
    M_1S_R3 = 3'd4,  // one radix-3 stage
    M_1S_R2 = 3'd5,  // one radix-2 stage
    M_BYP   = 3'd6   // pass-through (super stage not needed for this size)
  } rpe_mode_t;

  // Configuration of one SDF sub-stage (slot) inside a super stage.
  // d is the feedback delay D; the sub-stage works on blocks of L = r*D
  // samples with L = 2^la * 3^lb, which sets its twiddle factors W_L^(q*n).
  typedef struct packed {
    logic [CW-1:0] d;
    logic [3:0]    la;
    logic [2:0]    lb;
  } slot_cfg_t;

  // Twiddle request: the factor W_L^e with L = 2^la * 3^lb.
  typedef struct packed {
    logic [CW-1:0] e;
    logic [3:0]    la;
    logic [2:0]    lb;
  } tw_req_t;

  function automatic cplxw_t widen(cplx_t x);
    cplxw_t y;
    y.re = WW'(x.re);
    y.im = WW'(x.im);
    return y;
  endfunction

  // Arithmetic shift right by s with round-half-up, then saturate.
  function automatic logic signed [DW-1:0] rsh_sat(logic signed [WW-1:0] v, int unsigned s);
    logic signed [WW:0] t;
    t = (WW+1)'(v);
    if (s != 0) t = (t + ((WW+1)'(1) <<< (s - 1))) >>> s;
    if (t > (WW+1)'(32767))       return 16'sd32767;
    else if (t < -(WW+1)'(32768)) return -16'sd32768;
    else                          return t[DW-1:0];
  endfunction

  function automatic cplx_t cscale(cplxw_t x, int unsigned s);
    cplx_t y;
    y.re = rsh_sat(x.re, s);
    y.im = rsh_sat(x.im, s);
    return y;
  endfunction

endpackage
