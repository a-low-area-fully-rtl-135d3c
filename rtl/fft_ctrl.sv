// fft_ctrl: control unit. Turns a requested size N = 2^X * 3^Y into the
// configuration of the four super stages, and frames the output stream.
//
// Configuration: cfg_load takes (cfg_x, cfg_y) if it is one of the 32
// supported points, otherwise the
// request is refused (cfg_ok = 0) and the previous size stays in force.
// The supported points are those of the document's X-Y chart: Y <= 5, 4, 4,
// 3, 2, 2, 1, 1, 0, 0 for X = 2 .. 11. The
// size is split over the super stages in data order (stage 0 receives the
// input, the document's super stage 4):
//   - one 2S-R3 stage for every pair of factors 3;
//   - a remaining single factor 3 goes to an R3-R2 stage (taking one factor 2
//     with it) when X is odd, or to a 1S-R3 stage when X is even;
//   - the remaining factors 2 fill 3S-R2 stages, then one 2S-R2 or 1S-R2;
//   - stages left over pass data through (BYP).
// Every supported size fits in four stages this way. Walking the radix
// stages in data order from L = N, a radix-r stage gets D = L/r and twiddle
// block length L, and the next stage sees L = D. The document lists the six
// radix modes and the four super stages but not this assignment rule, which
// is this design's choice. A new size must only be loaded while no frame is
// in flight.
//
// Output framing: pipe_start is the frame-start tag leaving the last super
// stage; out_valid then stays high for N cycles while out_idx counts the
// output positions 0 .. N-1 (the results come in mixed-radix digit-reversed
// order of the frequency index).
module fft_ctrl
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,
  input  logic [3:0]    cfg_x,
  input  logic [2:0]    cfg_y,
  output logic          cfg_ok,      // last request accepted
  output logic [CW-1:0] n_pts,
  output rpe_mode_t     mode  [NSTAGE],
  output slot_cfg_t     scfg  [NSTAGE][3],
  input  logic          pipe_start,
  output logic          out_valid,
  output logic [CW-1:0] out_idx
);
  logic [3:0] x_q;
  logic [2:0] y_q;
  logic       req_ok;

  function automatic logic [CW-1:0] pow23(logic [3:0] a, logic [2:0] b);
    logic [CW+8:0] p;
    p = (CW+9)'(1) << a;
    for (int i = 0; i < 5; i++) if (32'(b) > i) p = p * 3;
    return (p > (CW+9)'(NMAX)) ? '0 : CW'(p);
  endfunction

  // largest Y for each X among the 32 supported points (X-Y plane of the
  // supported sizes); 2^6*3^3 = 1728 and 2^3*3^5 = 1944 are not among them
  function automatic logic [2:0] y_max(logic [3:0] x);
    case (x)
      4'd2:        return 3'd5;
      4'd3, 4'd4:  return 3'd4;
      4'd5:        return 3'd3;
      4'd6, 4'd7:  return 3'd2;
      4'd8, 4'd9:  return 3'd1;
      default:     return 3'd0;
    endcase
  endfunction

  assign req_ok = (cfg_x >= 4'd2) && (cfg_x <= 4'd11) && (cfg_y <= y_max(cfg_x));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= 4'd11;
      y_q    <= 3'd0;
      cfg_ok <= 1'b1;
    end else if (cfg_load) begin
      cfg_ok <= req_ok;
      if (req_ok) begin
        x_q <= cfg_x;
        y_q <= cfg_y;
      end
    end
  end

  assign n_pts = pow23(x_q, y_q);

  // stage modes and slot configuration
  always_comb begin
    int unsigned xr, yr, la, lb;
    rpe_mode_t   m;
    xr = 32'(x_q);
    yr = 32'(y_q);
    la = xr;
    lb = yr;
    for (int s = 0; s < NSTAGE; s++) begin
      if (yr >= 2) begin
        m = M_2S_R3; yr = yr - 2;
      end else if (yr == 1 && xr % 2 == 1) begin
        m = M_R3_R2; yr = 0; xr = xr - 1;
      end else if (yr == 1) begin
        m = M_1S_R3; yr = 0;
      end else if (xr >= 3) begin
        m = M_3S_R2; xr = xr - 3;
      end else if (xr == 2) begin
        m = M_2S_R2; xr = 0;
      end else if (xr == 1) begin
        m = M_1S_R2; xr = 0;
      end else begin
        m = M_BYP;
      end
      mode[s] = m;
      for (int k = 0; k < 3; k++) scfg[s][k] = '{d: CW'(1), la: 4'd0, lb: 3'd0};
      // slots used in data order: A, B, C (a radix-3 stage in banks 5-7 is slot B)
      for (int k = 0; k < 3; k++) begin
        logic use_k, r3_k;
        case (m)
          M_2S_R3: begin use_k = (k != 2); r3_k = 1'b1; end
          M_R3_R2: begin use_k = (k != 1); r3_k = (k == 0); end
          M_3S_R2: begin use_k = 1'b1;     r3_k = 1'b0; end
          M_2S_R2: begin use_k = (k != 0); r3_k = 1'b0; end
          M_1S_R3: begin use_k = (k == 1); r3_k = 1'b1; end
          M_1S_R2: begin use_k = (k == 2); r3_k = 1'b0; end
          default: begin use_k = 1'b0;     r3_k = 1'b0; end
        endcase
        if (use_k) begin
          scfg[s][k].la = 4'(la);
          scfg[s][k].lb = 3'(lb);
          if (r3_k) lb = lb - 1;
          else      la = la - 1;
          scfg[s][k].d = pow23(4'(la), 3'(lb));
        end
      end
    end
  end

  // output framing
  logic [CW-1:0] cnt_q;
  logic          run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      run_q <= 1'b0;
    end else if (pipe_start) begin
      cnt_q <= CW'(1);
      run_q <= (n_pts > CW'(1));
    end else if (run_q) begin
      cnt_q <= cnt_q + 1'b1;
      run_q <= (cnt_q + 1'b1 < n_pts);
    end
  end

  assign out_valid = pipe_start || run_q;
  assign out_idx   = pipe_start ? '0 : cnt_q;
endmodule
