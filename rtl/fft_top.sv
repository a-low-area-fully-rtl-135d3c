// fft_top: reconfigurable single-path delay-feedback FFT for the 32 LTE sizes
// N = 2^X * 3^Y (4 <= N <= 2048).
//
// Four reconfigurable processing elements (super stages) are chained: the
// input enters stage 0 (the document's super stage 4) and the result leaves
// stage 3 (super stage 1). Each stage runs up to three radix-2/radix-3
// delay-feedback sub-stages and exchanges up to four FIFO chains with the
// shared FIFO bank, which lays all chains of the current size out in one
// 2048-word store. The twiddle unit serves the three twiddle multipliers of
// every stage, and the control unit derives every stage's mode, delays and
// twiddle block lengths from the size.
//
// Interface and timing: load a size with cfg_load/cfg_x/cfg_y (refused sizes
// give cfg_ok = 0); after reset the size is 2048. Then stream one complex
// sample per cycle on din, with din_start high on the first sample of each
// frame; frames may follow back to back, and N consecutive samples must
// follow each din_start (an assertion checks this). The pipeline never
// stalls: after the last frame it keeps running on whatever din holds and
// so flushes itself. Each frame comes out as N consecutive samples with
// dout_valid high and dout_idx = 0 .. N-1; dout_idx is the mixed-radix digit
// reversal of the frequency index, taken with the radices in data order. The
// latency from din_start to the first dout_valid is N - 1 + (number of radix
// sub-stages) + (number of pass-through stages) cycles. Results are
// DFT / (2^X * 4^Y), 16-bit. ca_active/cm_active show, per stage, which adder
// pairs and multipliers the current size switches on (the rest see zero
// operands). The structure (four identical super stages around one FIFO bank,
// twiddle and control units) follows the document; the sample format,
// scaling, framing and the size-to-mode rule are this design's choices.
module fft_top
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,
  input  logic [3:0]    cfg_x,
  input  logic [2:0]    cfg_y,
  output logic          cfg_ok,
  output logic [CW-1:0] n_pts,
  input  cplx_t         din,
  input  logic          din_start,
  output cplx_t         dout,
  output logic          dout_valid,
  output logic [CW-1:0] dout_idx,
  output logic          fifo_overflow,
  output logic [6*NSTAGE-1:0] ca_active,   // active adder pairs, 6 per stage
  output logic [4*NSTAGE-1:0] cm_active    // active multipliers, 4 per stage
);
  rpe_mode_t     mode    [NSTAGE];
  slot_cfg_t     scfg    [NSTAGE][3];
  cplx_t         sd      [NSTAGE+1];
  logic          sst     [NSTAGE+1];
  cplx_t         f_rd    [NCHAIN];
  cplx_t         f_wr    [NCHAIN];
  logic [CW-1:0] f_len   [NCHAIN];
  tw_req_t       tw_req  [NSTAGE*3];
  cplx_t         tw      [NSTAGE*3];

  fft_ctrl u_ctrl (
    .clk, .rst_n, .cfg_load, .cfg_x, .cfg_y, .cfg_ok, .n_pts,
    .mode, .scfg, .pipe_start(sst[NSTAGE]), .out_valid(dout_valid), .out_idx(dout_idx)
  );

  assign sd[0]  = din;
  assign sst[0] = din_start;

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    cplx_t         rd_s  [MCH];
    cplx_t         wr_s  [MCH];
    logic [CW-1:0] len_s [MCH];
    tw_req_t       req_s [3];
    cplx_t         tw_s  [3];

    for (genvar i = 0; i < MCH; i++) begin : g_ch
      assign rd_s[i]           = f_rd[s*MCH+i];
      assign f_wr[s*MCH+i]     = wr_s[i];
      assign f_len[s*MCH+i]    = len_s[i];
    end
    for (genvar i = 0; i < 3; i++) begin : g_tw
      assign tw_req[s*3+i] = req_s[i];
      assign tw_s[i]       = tw[s*3+i];
    end

    rpe u_rpe (
      .clk, .rst_n, .mode(mode[s]), .cfg(scfg[s]),
      .din(sd[s]), .din_start(sst[s]), .dout(sd[s+1]), .dout_start(sst[s+1]),
      .fifo_rd(rd_s), .fifo_wr(wr_s), .chain_len(len_s),
      .ca_active(ca_active[6*s +: 6]), .cm_active(cm_active[4*s +: 4]),
      .tw_req(req_s), .tw(tw_s)
    );
  end

  fifo_bank u_bank (
    .clk, .rst_n, .len(f_len), .wr(f_wr), .rd(f_rd), .overflow(fifo_overflow)
  );

  twiddle_unit u_tw (.req(tw_req), .tw(tw));

  assign dout = sd[NSTAGE];

  // Framing rule: each din_start must be followed by N samples, so the next
  // din_start may come N cycles later at the earliest. gap_q counts the
  // cycles since the last din_start (saturating); loading a size restarts it.
  logic [CW:0] gap_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                gap_q <= '1;
    else if (cfg_load)         gap_q <= '1;
    else if (din_start)        gap_q <= (CW+1)'(1);
    else if (gap_q != '1)      gap_q <= gap_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!cfg_load && din_start)
      a_frame_len: assert (gap_q >= (CW+1)'(n_pts))
        else $error("din_start %0d cycles after the previous one, frame length %0d", gap_q, n_pts);
  end
endmodule
