// rpe: reconfigurable processing element, one "super stage" of the FFT.
//
// The element holds 12 complex adders and 4 complex multipliers grouped in
// eight banks, in data order: adder bank 1 (CA1-1, CA1-2), mixed bank 1
// (CA2-1, CA2-2, CM2), adder bank 2 (CA3-1, CA3-2), multiplier bank 1 (CM4),
// adder bank 3 (CA5-1, CA5-2), mixed bank 2 (CA6-1, CA6-2, CM6), adder bank 4
// (CA7-1, CA7-2) and multiplier bank 2 (CM8). The mode decides which banks
// work and how they chain; each radix stage is a single-path delay-feedback
// (SDF) stage whose feedback FIFOs live in the shared FIFO bank:
//
//   mode    sub-stages (data order)                      adders mults chains
//   2S-R3   R3(CA1,CA2,CM2,CA3) CM4  R3(CA5,CA6,CM6,CA7) CM8   12  4  4
//   R3-R2   R3(CA1,CA2,CM2,CA3) CM4  R2(CA7) CM8                8  3  3
//   3S-R2   R2(CA2) CM4  R2(CA5) CM6  R2(CA7) CM8               6  3  3
//   2S-R2   R2(CA5) CM6  R2(CA7) CM8                            4  2  2
//   1S-R3   R3(CA5,CA6,CM6,CA7) CM8                             6  2  2
//   1S-R2   R2(CA7) CM8                                         2  1  1
//   BYP     register only (this design's pass-through mode)
//
// A radix-3 butterfly on a, b, c: t1 = b+c, t2 = b-c (first adder bank),
// X0 = a+t1, m1 = a - t1/2 (mixed bank adders), m2 = -j*sqrt(3)/2 * t2 (mixed
// bank multiplier used with a constant), X1 = m1+m2, X2 = m1-m2 (next adder
// bank). The following multiplier applies the inter-stage twiddle factor.
//
// SDF schedule, radix-2, FIFO f of length D: phase 0 writes the input into f
// and outputs f (the previous period's difference); phase 1 outputs f+x and
// writes f-x back. Radix-3, FIFOs f1 and f2 of length D each: phase 0 outputs
// f1 (X1), writes x to f1 and recirculates f2 (X2); phase 1 outputs f2 (X2),
// writes x to f1 and f1 to f2; phase 2 computes with a=f2, b=f1, c=x, outputs
// X0 and writes X1 to f1 and X2 to f2. Butterfly results are scaled by 1/2
// (radix-2) or 1/4 (radix-3) and saturated to 16 bits before they are stored
// or passed on, so the transform computes DFT / (2^X * 4^Y).
//
// Interface: one sample per cycle on din with din_start on a frame's first
// sample; dout/dout_start likewise, one register per sub-stage later. The
// FIFO chains are exchanged with the bank on fifo_rd/fifo_wr (m of the MCH
// ports used, in the order the sub-stages use them, chain_len telling the
// bank the length of each); the three twiddle
// multipliers CM4, CM6, CM8 send requests to and take factors from the
// twiddle unit on tw_req/tw (combinational). ca_active/cm_active report
// which adder pairs and multipliers the mode activates; the others get zero
// operands. cfg gives D and the block length
// of slots A (banks 1-3), B (banks 5-6) and C (bank 7); a radix-3 stage in
// banks 5-7 is configured by slot B. The bank structure, the mode list and
// the adder/multiplier counts follow the document; the schedule, the scaling
// and the register placement are this design's choices.
module rpe
  import fft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rpe_mode_t mode,
  input  slot_cfg_t cfg        [3],
  input  cplx_t     din,
  input  logic      din_start,
  output cplx_t     dout,
  output logic      dout_start,
  input  cplx_t     fifo_rd    [MCH],
  output cplx_t     fifo_wr    [MCH],
  output logic [CW-1:0] chain_len [MCH],
  output logic [5:0] ca_active,   // adder pairs CA1, CA2, CA3, CA5, CA6, CA7 in use
  output logic [3:0] cm_active,   // multipliers CM2, CM4, CM6, CM8 in use
  output tw_req_t   tw_req     [3],
  input  cplx_t     tw         [3]
);
  localparam cplx_t NEG_J_SQRT3_2 = '{re: '0, im: -SQRT3_2};

  // ---------------- mode decoding ----------------
  logic a_on, a_r3, b_on, b_r3, c_on;
  logic [1:0] pa0, pa1, pb0, pb1, pc0;

  always_comb begin
    a_on = 1'b0; a_r3 = 1'b0; b_on = 1'b0; b_r3 = 1'b0; c_on = 1'b0;
    pa0 = 2'd0; pa1 = 2'd1; pb0 = 2'd0; pb1 = 2'd1; pc0 = 2'd0;
    case (mode)
      M_2S_R3: begin a_on = 1'b1; a_r3 = 1'b1; b_on = 1'b1; b_r3 = 1'b1; pb0 = 2'd2; pb1 = 2'd3; end
      M_R3_R2: begin a_on = 1'b1; a_r3 = 1'b1; c_on = 1'b1; pc0 = 2'd2; end
      M_3S_R2: begin a_on = 1'b1; b_on = 1'b1; c_on = 1'b1; pb0 = 2'd1; pc0 = 2'd2; end
      M_2S_R2: begin b_on = 1'b1; c_on = 1'b1; pb0 = 2'd0; pc0 = 2'd1; end
      M_1S_R3: begin b_on = 1'b1; b_r3 = 1'b1; pb0 = 2'd0; pb1 = 2'd1; end
      M_1S_R2: begin c_on = 1'b1; pc0 = 2'd0; end
      default: ;
    endcase
  end

  // Bank activation: a unit the mode does not use sees zero operands
  // (operand isolation), so it does not toggle.
  logic en1, en2, en3, en5, en6, en7;
  logic em2, em4, em6, em8;
  assign en1 = a_r3;           // 2S-R3, R3-R2
  assign en2 = a_on;           // 2S-R3, R3-R2, 3S-R2
  assign en3 = a_r3;
  assign em2 = a_r3;
  assign em4 = a_on;
  assign en5 = b_on;           // 2S-R3, 1S-R3, 3S-R2, 2S-R2
  assign en6 = b_r3;           // 2S-R3, 1S-R3
  assign em6 = b_on;
  assign en7 = b_r3 || c_on;   // every radix mode
  assign em8 = b_r3 || c_on;
  assign ca_active = {en7, en6, en5, en3, en2, en1};
  assign cm_active = {em8, em6, em4, em2};

  function automatic cplxw_t iso(cplxw_t v, logic en);
    return en ? v : '0;
  endfunction

  // ---------------- SDF sequencing of the three slots ----------------
  logic [1:0]    ph_a, ph_b, ph_c;
  logic [CW-1:0] e_a, e_b, e_c;
  logic          os_a, os_b, os_c;
  logic          start_b, start_c;

  cplx_t reg_a, reg_b, reg_c;
  logic  reg_a_st, reg_b_st, reg_c_st;
  cplx_t x_b, x_c;

  always_comb begin
    // slot B input: after slot A in 2S-R3 / 3S-R2, else the element input
    x_b     = (mode == M_2S_R3 || mode == M_3S_R2) ? reg_a    : din;
    start_b = (mode == M_2S_R3 || mode == M_3S_R2) ? reg_a_st : din_start;
    case (mode)
      M_3S_R2, M_2S_R2: begin x_c = reg_b; start_c = reg_b_st;  end
      M_R3_R2:          begin x_c = reg_a; start_c = reg_a_st;  end
      default:          begin x_c = din;   start_c = din_start; end
    endcase
  end

  sdf_ctrl u_ctl_a (.clk, .rst_n, .radix3(a_r3), .d(cfg[0].d), .start(din_start),
                    .phase(ph_a), .e(e_a), .out_start(os_a));
  sdf_ctrl u_ctl_b (.clk, .rst_n, .radix3(b_r3), .d(cfg[1].d), .start(start_b),
                    .phase(ph_b), .e(e_b), .out_start(os_b));
  sdf_ctrl u_ctl_c (.clk, .rst_n, .radix3(1'b0), .d(cfg[2].d), .start(start_c),
                    .phase(ph_c), .e(e_c), .out_start(os_c));

  // ---------------- the eight computing banks ----------------
  cplxw_t fa1, fa2, fb1, fb2, fc, xa, xbw, xcw;
  cplxw_t ca1_1, ca1_2, ca2_1, ca2_2, ca3_1, ca3_2;
  cplxw_t ca5_1, ca5_2, ca6_1, ca6_2, ca7_1, ca7_2;
  cplxw_t cm2, cm4, cm6, cm8;
  cplxw_t a2_a, a2_b, a6_b, a7_a, a7_b, m6_x, m8_x;
  cplx_t  m6_w;
  cplx_t  out_a, out_b, out_c;

  assign fa1 = widen(fifo_rd[pa0]);
  assign fa2 = widen(fifo_rd[pa1]);
  assign fb1 = widen(fifo_rd[pb0]);
  assign fb2 = widen(fifo_rd[pb1]);
  assign fc  = widen(fifo_rd[pc0]);
  assign xa  = widen(din);
  assign xbw = widen(x_b);
  assign xcw = widen(x_c);

  // adder bank 1: t1, t2 of the slot-A radix-3 butterfly
  cplx_add u_ca1_1 (.a(iso(fa1, en1)), .b(iso(xa, en1)), .sub(1'b0), .y(ca1_1));
  cplx_add u_ca1_2 (.a(iso(fa1, en1)), .b(iso(xa, en1)), .sub(1'b1), .y(ca1_2));

  // mixed bank 1: X0 and m1 (radix-3) or the radix-2 butterfly of 3S-R2
  always_comb begin
    if (a_r3) begin
      a2_a = fa2;
      a2_b = ca1_1;
    end else begin
      a2_a = fa1;
      a2_b = xa;
    end
  end
  cplx_add u_ca2_1 (.a(iso(a2_a, en2)), .b(iso(a2_b, en2)), .sub(1'b0), .y(ca2_1));
  cplx_add u_ca2_2 (.a(iso(a2_a, en2)),
                    .b(iso(a_r3 ? cplxw_t'({ca1_1.re >>> 1, ca1_1.im >>> 1}) : a2_b, en2)),
                    .sub(1'b1), .y(ca2_2));
  cplx_mul u_cm2   (.x(iso(ca1_2, em2)), .w(NEG_J_SQRT3_2), .y(cm2));

  // adder bank 2: X1, X2 of the slot-A radix-3 butterfly
  cplx_add u_ca3_1 (.a(iso(ca2_2, en3)), .b(iso(cm2, en3)), .sub(1'b0), .y(ca3_1));
  cplx_add u_ca3_2 (.a(iso(ca2_2, en3)), .b(iso(cm2, en3)), .sub(1'b1), .y(ca3_2));

  // slot A output and FIFO writes
  cplx_t wa0, wa1;
  always_comb begin
    wa0 = din;
    wa1 = '0;
    if (a_r3) begin
      case (ph_a)
        2'd0:    begin out_a = fifo_rd[pa0]; wa1 = fifo_rd[pa1]; end
        2'd1:    begin out_a = fifo_rd[pa1]; wa1 = fifo_rd[pa0]; end
        default: begin out_a = cscale(ca2_1, 2); wa0 = cscale(ca3_1, 2); wa1 = cscale(ca3_2, 2); end
      endcase
    end else begin
      if (ph_a == 2'd0) out_a = fifo_rd[pa0];
      else begin
        out_a = cscale(ca2_1, 1);
        wa0   = cscale(ca2_2, 1);
      end
    end
  end

  // multiplier bank 1: twiddle factor after slot A
  cplx_mul u_cm4 (.x(iso(widen(out_a), em4)), .w(tw[0]), .y(cm4));

  // adder bank 3: t1, t2 (radix-3) or the radix-2 butterfly of slot B
  cplx_add u_ca5_1 (.a(iso(fb1, en5)), .b(iso(xbw, en5)), .sub(1'b0), .y(ca5_1));
  cplx_add u_ca5_2 (.a(iso(fb1, en5)), .b(iso(xbw, en5)), .sub(1'b1), .y(ca5_2));

  // mixed bank 2: X0 and m1 of the radix-3 butterfly in banks 5-7
  assign a6_b = cplxw_t'({ca5_1.re >>> 1, ca5_1.im >>> 1});
  cplx_add u_ca6_1 (.a(iso(fb2, en6)), .b(iso(ca5_1, en6)), .sub(1'b0), .y(ca6_1));
  cplx_add u_ca6_2 (.a(iso(fb2, en6)), .b(iso(a6_b, en6)), .sub(1'b1), .y(ca6_2));

  // CM6: radix-3 constant in 2S-R3 / 1S-R3, twiddle after slot B otherwise
  always_comb begin
    if (b_r3) begin
      m6_x = ca5_2;
      m6_w = NEG_J_SQRT3_2;
    end else begin
      m6_x = widen(out_b);
      m6_w = tw[1];
    end
  end
  cplx_mul u_cm6 (.x(iso(m6_x, em6)), .w(m6_w), .y(cm6));

  // adder bank 4: X1, X2 of the radix-3 butterfly, or the radix-2 butterfly of slot C
  always_comb begin
    if (b_r3) begin
      a7_a = ca6_2;
      a7_b = cm6;
    end else begin
      a7_a = fc;
      a7_b = xcw;
    end
  end
  cplx_add u_ca7_1 (.a(iso(a7_a, en7)), .b(iso(a7_b, en7)), .sub(1'b0), .y(ca7_1));
  cplx_add u_ca7_2 (.a(iso(a7_a, en7)), .b(iso(a7_b, en7)), .sub(1'b1), .y(ca7_2));

  // slot B output (radix-2) or banks 5-7 output (radix-3), and their FIFO writes
  cplx_t wb0, wb1;
  always_comb begin
    wb0 = x_b;
    wb1 = '0;
    if (b_r3) begin
      case (ph_b)
        2'd0:    begin out_b = fifo_rd[pb0]; wb1 = fifo_rd[pb1]; end
        2'd1:    begin out_b = fifo_rd[pb1]; wb1 = fifo_rd[pb0]; end
        default: begin out_b = cscale(ca6_1, 2); wb0 = cscale(ca7_1, 2); wb1 = cscale(ca7_2, 2); end
      endcase
    end else begin
      if (ph_b == 2'd0) out_b = fifo_rd[pb0];
      else begin
        out_b = cscale(ca5_1, 1);
        wb0   = cscale(ca5_2, 1);
      end
    end
  end

  // slot C output (radix-2) and its FIFO write
  cplx_t wc0;
  always_comb begin
    wc0 = x_c;
    if (ph_c == 2'd0) out_c = fifo_rd[pc0];
    else begin
      out_c = cscale(ca7_1, 1);
      wc0   = cscale(ca7_2, 1);
    end
  end

  // multiplier bank 2: twiddle factor on the element's last radix stage
  assign m8_x = b_r3 ? widen(out_b) : widen(out_c);
  cplx_mul u_cm8 (.x(iso(m8_x, em8)), .w(tw[2]), .y(cm8));

  // ---------------- twiddle requests ----------------
  always_comb begin
    tw_req[0] = '{e: e_a, la: cfg[0].la, lb: cfg[0].lb};
    tw_req[1] = '{e: e_b, la: cfg[1].la, lb: cfg[1].lb};
    if (b_r3) tw_req[2] = '{e: e_b, la: cfg[1].la, lb: cfg[1].lb};
    else      tw_req[2] = '{e: e_c, la: cfg[2].la, lb: cfg[2].lb};
  end

  // ---------------- FIFO chain ports ----------------
  always_comb begin
    for (int i = 0; i < MCH; i++) fifo_wr[i] = '0;
    if (a_on) begin
      fifo_wr[pa0] = wa0;
      if (a_r3) fifo_wr[pa1] = wa1;
    end
    if (b_on) begin
      fifo_wr[pb0] = wb0;
      if (b_r3) fifo_wr[pb1] = wb1;
    end
    if (c_on) fifo_wr[pc0] = wc0;
  end

  // length of each chain this element uses (0: port unused)
  always_comb begin
    for (int i = 0; i < MCH; i++) chain_len[i] = '0;
    if (a_on) begin
      chain_len[pa0] = cfg[0].d;
      if (a_r3) chain_len[pa1] = cfg[0].d;
    end
    if (b_on) begin
      chain_len[pb0] = cfg[1].d;
      if (b_r3) chain_len[pb1] = cfg[1].d;
    end
    if (c_on) chain_len[pc0] = cfg[2].d;
  end

  // ---------------- sub-stage registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0; reg_b <= '0; reg_c <= '0;
      reg_a_st <= 1'b0; reg_b_st <= 1'b0; reg_c_st <= 1'b0;
    end else begin
      reg_a    <= cscale(cm4, 0);
      reg_a_st <= a_on && os_a;
      reg_b    <= cscale(cm6, 0);
      reg_b_st <= b_on && !b_r3 && os_b;
      if (mode == M_BYP) begin
        reg_c    <= din;
        reg_c_st <= din_start;
      end else begin
        reg_c    <= cscale(cm8, 0);
        reg_c_st <= b_r3 ? os_b : (c_on && os_c);
      end
    end
  end

  assign dout       = reg_c;
  assign dout_start = reg_c_st;

endmodule
