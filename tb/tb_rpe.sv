// tb_rpe: checks one reconfigurable processing element in each of its modes.
//
// For every mode the element is configured to compute a complete DFT on its
// own: 2S-R3 a 9-point, R3-R2 a 6-point, 3S-R2 an 8-point, 2S-R2 a 4-point,
// 1S-R3 a 3-point and 1S-R2 a 2-point transform (the sub-stage delays and
// twiddle block lengths follow from walking L = N down the radices), and the
// pass-through mode must delay its input by one cycle. The FIFO bank is
// modelled here by ideal delay lines of the lengths the element asks for, and
// the twiddle unit by cos/sin rounded to Q1.15. Five frames of random data
// per mode are streamed back to back; each output is compared with a direct
// DFT divided by 2^(radix-2 stages) * 4^(radix-3 stages), at the
// digit-reversed position, and the latency (N - 1 + number of sub-stages) is
// checked. The numbers of active adders j, active multipliers k and FIFO
// chains m are checked against each mode's {j, k, m}: 2S-R3 {12, 4, 4},
// R3-R2 {8, 3, 3}, 3S-R2 {6, 3, 3}, 2S-R2 {4, 2, 2}, 1S-R3 {6, 2, 2},
// 1S-R2 {2, 1, 1}.
module tb_rpe;
  import fft_pkg::*;

  localparam int TOL = 2;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  rpe_mode_t     mode;
  slot_cfg_t     cfg        [3];
  cplx_t         din;
  logic          din_start;
  cplx_t         dout;
  logic          dout_start;
  cplx_t         fifo_rd    [MCH];
  cplx_t         fifo_wr    [MCH];
  logic [CW-1:0] chain_len  [MCH];
  logic [5:0]    ca_active;
  logic [3:0]    cm_active;
  tw_req_t       tw_req     [3];
  cplx_t         tw         [3];

  rpe dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal delay lines standing in for the FIFO bank
  cplx_t hist [MCH][4096];
  int    wptr = 0;

  function automatic cplx_t tw_model(tw_req_t r);
    real   ang;
    int    l;
    cplx_t w;
    l   = (1 << r.la) * (3 ** r.lb);
    ang = 2.0 * 3.14159265358979323846 * real'(r.e) / real'(l);
    w.re = 16'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
    w.im = 16'($rtoi($floor(-32767.0 * $sin(ang) + 0.5)));
    return w;
  endfunction

  // mode -> sub-stage radices and the slots they use
  int rad [3], slot [3], nsub, mexp, jexp, kexp;

  task automatic describe(rpe_mode_t m);
    case (m)
      M_2S_R3: begin nsub = 2; rad = '{3, 3, 0}; slot = '{0, 1, 0}; mexp = 4; jexp = 12; kexp = 4; end
      M_R3_R2: begin nsub = 2; rad = '{3, 2, 0}; slot = '{0, 2, 0}; mexp = 3; jexp = 8; kexp = 3; end
      M_3S_R2: begin nsub = 3; rad = '{2, 2, 2}; slot = '{0, 1, 2}; mexp = 3; jexp = 6; kexp = 3; end
      M_2S_R2: begin nsub = 2; rad = '{2, 2, 0}; slot = '{1, 2, 0}; mexp = 2; jexp = 4; kexp = 2; end
      M_1S_R3: begin nsub = 1; rad = '{3, 0, 0}; slot = '{1, 0, 0}; mexp = 2; jexp = 6; kexp = 2; end
      M_1S_R2: begin nsub = 1; rad = '{2, 0, 0}; slot = '{2, 0, 0}; mexp = 1; jexp = 2; kexp = 1; end
      default: begin nsub = 0; rad = '{0, 0, 0}; slot = '{0, 0, 0}; mexp = 0; jexp = 0; kexp = 0; end
    endcase
  endtask

  localparam int NFR = 5;
  int  xin_re [NFR*9], xin_im [NFR*9];

  task automatic run_mode(rpe_mode_t m);
    int n, a2, b3, la, lb, lat, got_frames, pos, start_at, active;
    real scale;
    describe(m);
    n = 1; a2 = 0; b3 = 0;
    for (int k = 0; k < nsub; k++) begin
      n *= rad[k];
      if (rad[k] == 2) a2++; else b3++;
    end
    scale = real'(1 << a2) * (4.0 ** b3);
    la = a2; lb = b3;
    for (int k = 0; k < 3; k++) cfg[k] = '{d: CW'(1), la: 4'd0, lb: 3'd0};
    for (int k = 0; k < nsub; k++) begin
      cfg[slot[k]].la = 4'(la);
      cfg[slot[k]].lb = 3'(lb);
      if (rad[k] == 2) la--; else lb--;
      cfg[slot[k]].d = CW'((1 << la) * (3 ** lb));
    end
    mode = m;
    lat  = (m == M_BYP) ? 1 : n - 1 + nsub;
    for (int i = 0; i < NFR * n; i++) begin
      xin_re[i] = $urandom_range(16383) - 8192;
      xin_im[i] = $urandom_range(16383) - 8192;
    end
    got_frames = 0; pos = 0; start_at = -1;
    #1;
    active = 0;
    for (int i = 0; i < MCH; i++) if (chain_len[i] != 0) active++;
    checks++;
    if (active != mexp) begin
      failures++;
      $display("mode %0d uses %0d chains, expected %0d", m, active, mexp);
    end
    checks += 2;
    if (2 * $countones(ca_active) != jexp) begin
      failures++;
      $display("mode %0d activates %0d adders, expected %0d", m, 2 * $countones(ca_active), jexp);
    end
    if ($countones(cm_active) != kexp) begin
      failures++;
      $display("mode %0d activates %0d multipliers, expected %0d", m, $countones(cm_active), kexp);
    end
    for (int c = 0; c < NFR * n + n + 8; c++) begin
      // FIFO model outputs for this cycle
      for (int i = 0; i < MCH; i++)
        fifo_rd[i] = (chain_len[i] == 0) ? '0 : hist[i][(wptr - int'(chain_len[i])) & 4095];
      if (c < NFR * n) begin
        din.re    = 16'(xin_re[c]);
        din.im    = 16'(xin_im[c]);
        din_start = (c % n == 0);
      end else begin
        din       = '0;
        din_start = 1'b0;
      end
      #1;
      for (int k = 0; k < 3; k++) tw[k] = tw_model(tw_req[k]);
      #1;
      for (int i = 0; i < MCH; i++) hist[i][wptr & 4095] = fifo_wr[i];
      wptr++;
      // registered outputs of the previous edge
      if (dout_start) begin
        if (start_at < 0) begin
          checks++;
          if (c != lat) begin
            failures++;
            $display("mode %0d latency %0d, expected %0d", m, c, lat);
          end
        end
        start_at = c;
        pos = 0;
      end
      if (start_at >= 0 && got_frames < NFR) begin
        real sr, si;
        int  k, rem, blk, wgt, fr, er, ei;
        logic signed [DW-1:0] gr, gi;
        fr = got_frames;
        // digit reversal of the output position
        k = 0; rem = pos; blk = n; wgt = 1;
        for (int s = 0; s < nsub; s++) begin
          blk /= rad[s];
          k   += (rem / blk) * wgt;
          rem %= blk;
          wgt *= rad[s];
        end
        if (m == M_BYP) k = pos;
        sr = 0.0; si = 0.0;
        for (int t = 0; t < n; t++) begin
          real ang;
          ang = (m == M_BYP) ? ((t == pos) ? 0.0 : 1.0e9)
                             : -2.0 * 3.14159265358979323846 * real'((k * t) % n) / real'(n);
          if (m == M_BYP) begin
            if (t == pos) begin sr = real'(xin_re[fr*n+t]); si = real'(xin_im[fr*n+t]); end
          end else begin
            sr += real'(xin_re[fr*n+t]) * $cos(ang) - real'(xin_im[fr*n+t]) * $sin(ang);
            si += real'(xin_re[fr*n+t]) * $sin(ang) + real'(xin_im[fr*n+t]) * $cos(ang);
          end
        end
        if (m != M_BYP) begin sr /= scale; si /= scale; end
        gr = dout.re;
        gi = dout.im;
        er = int'(real'(gr) - sr); if (er < 0) er = -er;
        ei = int'(real'(gi) - si); if (ei < 0) ei = -ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          if (failures < 12)
            $display("mode %0d frame %0d pos %0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                     m, fr, pos, gr, gi, sr, si);
        end
        pos++;
        if (pos == n) begin
          pos = 0;
          got_frames++;
        end
      end
      @(negedge clk);
      cycle++;
    end
    checks++;
    if (got_frames != NFR) begin
      failures++;
      $display("mode %0d: %0d frames out of %0d", m, got_frames, NFR);
    end
  endtask

  initial begin
    mode = M_1S_R2;
    din = '0;
    din_start = 1'b0;
    for (int k = 0; k < 3; k++) begin cfg[k] = '{d: CW'(1), la: 4'd0, lb: 3'd0}; tw[k] = '0; end
    for (int i = 0; i < MCH; i++) fifo_rd[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_mode(M_2S_R3);
    run_mode(M_R3_R2);
    run_mode(M_3S_R2);
    run_mode(M_2S_R2);
    run_mode(M_1S_R3);
    run_mode(M_1S_R2);
    run_mode(M_BYP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
