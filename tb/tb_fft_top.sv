// tb_fft_top: end-to-end test of the reconfigurable FFT at its full size.
//
// Runs all 32 transform sizes N = 2^X * 3^Y, in an order that makes every
// super-stage mode, pass-through and size switch occur, with one frame of
// random complex samples each (two frames back to back for a few sizes).
// Every output is compared with a direct DFT computed here in floating point,
// divided by 2^X * 4^Y (the design's scaling), at the frequency index given by
// mixed-radix digit reversal of the output position. The radix order used
// for the reversal is worked out here from the size-to-mode rule of the
// control unit, written independently of it. The test also checks the
// latency (N - 1 + radix sub-stages + pass-through stages), that each frame
// arrives as N consecutive outputs, that an unsupported size is refused, that
// the adders and multipliers switched on per size match the per-mode counts
// {j, k} (2S-R3 12/4, R3-R2 8/3, 3S-R2 6/3, 2S-R2 4/2, 1S-R3 6/2, 1S-R2 2/1),
// and
// counts how often each mechanism happened. The super-stage modes are
// counted from the radix plan of each size; since every output is checked at
// the position that plan predicts, a passing run shows the design used them.
module tb_fft_top;
  import fft_pkg::*;

  localparam int TOL = 4;   // allowed error per component, in LSBs

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          cfg_load = 1'b0;
  logic [3:0]    cfg_x = '0;
  logic [2:0]    cfg_y = '0;
  logic          cfg_ok;
  logic [CW-1:0] n_pts;
  cplx_t         din = '0;
  logic          din_start = 1'b0;
  cplx_t         dout;
  logic          dout_valid;
  logic [CW-1:0] dout_idx;
  logic          fifo_overflow;
  logic [6*NSTAGE-1:0] ca_active;
  logic [4*NSTAGE-1:0] cm_active;

  fft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int cnt_mode [7];
  int cnt_switch = 0, cnt_refused = 0, cnt_b2b = 0;
  int sum_add = 0, sum_mul = 0;

  // ---------------- reference model ----------------
  int radix [16];
  int nrad, nbyp, nadd, nmul;

  task automatic plan(input int x, input int y);
    int xr, yr;
    xr = x; yr = y; nrad = 0; nbyp = 0; nadd = 0; nmul = 0;
    for (int s = 0; s < 4; s++) begin
      if (yr >= 2)                   begin radix[nrad++] = 3; radix[nrad++] = 3; yr -= 2; nadd += 12; nmul += 4; cnt_mode[0]++; end
      else if (yr == 1 && xr % 2 == 1) begin radix[nrad++] = 3; radix[nrad++] = 2; yr = 0; xr -= 1; nadd += 8; nmul += 3; cnt_mode[1]++; end
      else if (yr == 1)              begin radix[nrad++] = 3; yr = 0; nadd += 6; nmul += 2; cnt_mode[4]++; end
      else if (xr >= 3)              begin repeat (3) radix[nrad++] = 2; xr -= 3; nadd += 6; nmul += 3; cnt_mode[2]++; end
      else if (xr == 2)              begin repeat (2) radix[nrad++] = 2; xr = 0; nadd += 4; nmul += 2; cnt_mode[3]++; end
      else if (xr == 1)              begin radix[nrad++] = 2; xr = 0; nadd += 2; nmul += 1; cnt_mode[5]++; end
      else                           begin nbyp++; cnt_mode[6]++; end
    end
  endtask

  // output position -> frequency index (mixed-radix digit reversal)
  function automatic int freq_of_pos(int p, int n);
    int k, w, rem, blk;
    k = 0; w = 1; rem = p; blk = n;
    for (int i = 0; i < nrad; i++) begin
      blk = blk / radix[i];
      k  += (rem / blk) * w;
      rem = rem % blk;
      w  *= radix[i];
    end
    return k;
  endfunction

  real in_re [2][2048], in_im [2][2048];

  // ---------------- checking ----------------
  int  exp_n, exp_lat, frames_left, frame_no, start_cycle [2];
  real scale;
  int  maxerr = 0;
  int  seen_first;

  task automatic check_out(int fr, int idx);
    real sr, si, ang;
    int  k, er, ei;
    logic signed [DW-1:0] gr, gi;
    k = freq_of_pos(idx, exp_n);
    sr = 0.0; si = 0.0;
    for (int t = 0; t < exp_n; t++) begin
      ang = -2.0 * 3.14159265358979323846 * real'((k * t) % exp_n) / real'(exp_n);
      sr += in_re[fr][t] * $cos(ang) - in_im[fr][t] * $sin(ang);
      si += in_re[fr][t] * $sin(ang) + in_im[fr][t] * $cos(ang);
    end
    sr = sr / scale; si = si / scale;
    gr = dout.re;
    gi = dout.im;
    er = int'(real'(gr) - sr); if (er < 0) er = -er;
    ei = int'(real'(gi) - si); if (ei < 0) ei = -ei;
    if (er > maxerr) begin maxerr = er; if (er > 3) $display("err %0d at N=%0d k=%0d", er, exp_n, k); end
    if (ei > maxerr) maxerr = ei;
    checks++;
    if (er > TOL || ei > TOL) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH N=%0d frame %0d pos %0d (k=%0d): got (%0d,%0d) want (%0.1f,%0.1f)",
                 exp_n, fr, idx, k, gr, gi, sr, si);
    end
  endtask

  int out_cnt, out_fr;
  logic collecting = 1'b0;

  // outputs are sampled at the falling edge, half a cycle after they change
  always @(negedge clk) begin
    if (collecting && dout_valid) begin
      if (dout_idx == 0) begin
        checks++;
        if (cycle - start_cycle[out_fr] != exp_lat) begin
          failures++;
          $display("LATENCY N=%0d: %0d cycles, expected %0d", exp_n, cycle - start_cycle[out_fr], exp_lat);
        end
      end
      checks++;
      if (int'(dout_idx) != out_cnt) begin
        failures++;
        $display("INDEX N=%0d: dout_idx %0d, expected %0d", exp_n, dout_idx, out_cnt);
      end
      check_out(out_fr, out_cnt);
      out_cnt++;
      if (out_cnt == exp_n) begin
        out_cnt = 0;
        out_fr++;
      end
    end
  end

  task automatic run_size(input int x, input int y, input int nframes);
    int n;
    n = (1 << x) * (3 ** y);
    plan(x, y);
    exp_n   = n;
    exp_lat = n - 1 + nrad + nbyp;
    scale   = real'(1 << x) * (4.0 ** y);
    // load the size
    @(negedge clk);
    cfg_x = 4'(x); cfg_y = 3'(y); cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
    checks++;
    if (!cfg_ok || int'(n_pts) != n) begin
      failures++;
      $display("CONFIG N=%0d refused or wrong (n_pts=%0d)", n, n_pts);
    end
    // adders and multipliers switched on: the sum of each stage's {j, k}
    checks++;
    if (2 * $countones(ca_active) != nadd || $countones(cm_active) != nmul) begin
      failures++;
      $display("N=%0d: %0d adders and %0d multipliers active, expected %0d and %0d",
               n, 2 * $countones(ca_active), $countones(cm_active), nadd, nmul);
    end
    sum_add += nadd; sum_mul += nmul;
    cnt_switch++;
    for (int f = 0; f < nframes; f++)
      for (int t = 0; t < n; t++) begin
        in_re[f][t] = real'($signed(16'($urandom_range(16383)) - 16'sd8192));
        in_im[f][t] = real'($signed(16'($urandom_range(16383)) - 16'sd8192));
      end
    out_cnt = 0; out_fr = 0; collecting = 1'b1;
    for (int f = 0; f < nframes; f++) begin
      if (f > 0) cnt_b2b++;
      for (int t = 0; t < n; t++) begin
        din.re = 16'(int'(in_re[f][t]));
        din.im = 16'(int'(in_im[f][t]));
        din_start = (t == 0);
        if (t == 0) start_cycle[f] = cycle;
        @(negedge clk);
      end
    end
    din_start = 1'b0;
    din = '0;
    // wait for all frames to come out
    while (out_fr < nframes) @(negedge clk);
    collecting = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  // largest Y for each X among the 32 supported points
  function automatic int ymax(int x);
    case (x)
      2: return 5;  3, 4: return 4;  5: return 3;  6, 7: return 2;  8, 9: return 1;
      default: return 0;
    endcase
  endfunction

  // the 32 points (X, Y), reordered so that sizes alternate
  int xs [32], ys [32];

  initial begin
    int np;
    np = 0;
    for (int y = 0; y <= 5; y++)
      for (int x = 2; x <= 11; x++)
        if (y <= ymax(x)) begin
          xs[np] = x; ys[np] = y; np++;
        end
    checks++;
    if (np != 32) begin failures++; $display("expected 32 sizes, found %0d", np); end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (int'(n_pts) != 2048) begin failures++; $display("reset size %0d", n_pts); end

    // an unsupported size is refused
    @(negedge clk);
    cfg_x = 4'd11; cfg_y = 3'd1; cfg_load = 1'b1;   // 6144 > 2048
    @(negedge clk);
    cfg_load = 1'b0;
    checks++;
    if (cfg_ok || int'(n_pts) != 2048) begin failures++; $display("unsupported size accepted"); end
    else cnt_refused++;

    for (int i = 0; i < np; i++) begin
      int j;
      j = (i * 7) % np;   // 7 and 32 are coprime: every size once, in mixed order
      run_size(xs[j], ys[j], (i % 8 == 0) ? 2 : 1);
    end

    $display("max error %0d LSB", maxerr);
    $display("modes used: 2S-R3 %0d, R3-R2 %0d, 3S-R2 %0d, 2S-R2 %0d, 1S-R3 %0d, 1S-R2 %0d, pass %0d",
             cnt_mode[0], cnt_mode[1], cnt_mode[2], cnt_mode[3], cnt_mode[4], cnt_mode[5], cnt_mode[6]);
    $display("active adders summed over sizes %0d, multipliers %0d", sum_add, sum_mul);
    $display("size switches %0d, refused sizes %0d, back-to-back frames %0d",
             cnt_switch, cnt_refused, cnt_b2b);
    for (int m = 0; m < 7; m++) begin
      checks++;
      if (cnt_mode[m] == 0) begin failures++; $display("mode %0d never used", m); end
    end
    checks += 3;
    if (cnt_switch < 2) failures++;
    if (cnt_refused == 0) failures++;
    if (cnt_b2b == 0) failures++;
    checks++;
    if (fifo_overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the FIFO bank must never be over-subscribed
  always @(posedge clk) if (rst_n && fifo_overflow) begin
    failures++;
    $display("FIFO bank overflow");
  end
endmodule
