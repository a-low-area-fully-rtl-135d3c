// tb_fft_ctrl: checks the control unit's size decoding and output framing.
//
// Every (X, Y) with X = 0..15 and Y = 0..7 is offered. Exactly the 32
// supported points must be accepted (the others refused, with the previous
// size kept). For an accepted size the test checks n_pts = 2^X * 3^Y, the
// super-stage modes against the assignment rule (pairs of factors 3 in
// 2S-R3, a single 3 in R3-R2 for odd X or 1S-R3 for even X, then 3S-R2,
// 2S-R2/1S-R2, then pass-through), and the slot configuration of every used
// sub-stage: its block length must be the running length L, its delay L/r,
// and the product of all radices must be N. For a few sizes a frame-start
// pulse is applied to check that out_valid stays high for exactly N cycles
// with out_idx counting 0 .. N-1.
module tb_fft_ctrl;
  import fft_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          cfg_load = 1'b0;
  logic [3:0]    cfg_x = '0;
  logic [2:0]    cfg_y = '0;
  logic          cfg_ok;
  logic [CW-1:0] n_pts;
  rpe_mode_t     mode  [NSTAGE];
  slot_cfg_t     scfg  [NSTAGE][3];
  logic          pipe_start = 1'b0;
  logic          out_valid;
  logic [CW-1:0] out_idx;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit supported(int x, int y);
    int ym [12] = '{-1, -1, 5, 4, 4, 3, 2, 2, 1, 1, 0, 0};
    return (x >= 2 && x <= 11 && y <= ym[x]);
  endfunction

  task automatic expect_modes(int x, int y, output rpe_mode_t em [NSTAGE]);
    int xr, yr;
    xr = x; yr = y;
    for (int s = 0; s < NSTAGE; s++) begin
      if (yr >= 2)                begin em[s] = M_2S_R3; yr -= 2; end
      else if (yr == 1 && xr % 2 == 1) begin em[s] = M_R3_R2; yr = 0; xr--; end
      else if (yr == 1)           begin em[s] = M_1S_R3; yr = 0; end
      else if (xr >= 3)           begin em[s] = M_3S_R2; xr -= 3; end
      else if (xr == 2)           begin em[s] = M_2S_R2; xr = 0; end
      else if (xr == 1)           begin em[s] = M_1S_R2; xr = 0; end
      else                        em[s] = M_BYP;
    end
  endtask

  int cur_n;
  int nacc = 0;

  task automatic frame_check(int n);
    @(negedge clk);
    pipe_start = 1'b1;
    for (int c = 0; c < n + 5; c++) begin
      #1;
      checks++;
      if (c < n) begin
        if (!out_valid || int'(out_idx) != c) begin
          failures++;
          $display("framing N=%0d cycle %0d: valid %b idx %0d", n, c, out_valid, out_idx);
        end
      end else if (out_valid) begin
        failures++;
        $display("framing N=%0d: valid too long at cycle %0d", n, c);
      end
      @(negedge clk);
      pipe_start = 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cur_n = 2048;
    checks++;
    if (int'(n_pts) != 2048) begin failures++; $display("reset size %0d", n_pts); end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 8; y++) begin
        rpe_mode_t em [NSTAGE];
        bit ok;
        ok = supported(x, y);
        cfg_x = 4'(x); cfg_y = 3'(y); cfg_load = 1'b1;
        @(negedge clk);
        cfg_load = 1'b0;
        if (ok) begin cur_n = (1 << x) * (3 ** y); nacc++; end
        checks += 2;
        if (cfg_ok != ok) begin failures++; $display("(%0d,%0d): cfg_ok %b", x, y, cfg_ok); end
        if (int'(n_pts) != cur_n) begin failures++; $display("(%0d,%0d): n_pts %0d, want %0d", x, y, n_pts, cur_n); end
        if (ok) begin
          int l, prod;
          expect_modes(x, y, em);
          l = cur_n; prod = 1;
          for (int s = 0; s < NSTAGE; s++) begin
            int r [3];
            checks++;
            if (mode[s] != em[s]) begin failures++; $display("(%0d,%0d) stage %0d mode %0d, want %0d", x, y, s, mode[s], em[s]); end
            case (em[s])
              M_2S_R3: r = '{3, 3, 0};
              M_R3_R2: r = '{3, 0, 2};
              M_3S_R2: r = '{2, 2, 2};
              M_2S_R2: r = '{0, 2, 2};
              M_1S_R3: r = '{0, 3, 0};
              M_1S_R2: r = '{0, 0, 2};
              default: r = '{0, 0, 0};
            endcase
            for (int k = 0; k < 3; k++) if (r[k] != 0) begin
              int lsub;
              lsub = (1 << scfg[s][k].la) * (3 ** scfg[s][k].lb);
              checks++;
              if (lsub != l || int'(scfg[s][k].d) != l / r[k]) begin
                failures++;
                $display("(%0d,%0d) stage %0d slot %0d: L %0d D %0d, want L %0d D %0d",
                         x, y, s, k, lsub, scfg[s][k].d, l, l / r[k]);
              end
              l /= r[k];
              prod *= r[k];
            end
          end
          checks++;
          if (prod != cur_n || l != 1) begin failures++; $display("(%0d,%0d): radix product %0d", x, y, prod); end
          if (cur_n == 4 || cur_n == 12 || cur_n == 1536 || cur_n == 2048) frame_check(cur_n);
        end
      end
    checks++;
    if (nacc != 32) begin failures++; $display("%0d sizes accepted, want 32", nacc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
