// sdf_ctrl: sequencing of one single-path delay-feedback (SDF) sub-stage.
//
// A radix-r sub-stage with feedback delay D works on periods of r*D samples,
// r phases of D cycles. The position pos (0 .. D-1) and the phase are
// restarted by the frame-start tag that travels with the first sample of a
// frame (start) and then wrap freely, so the sub-stage keeps flushing after
// the last frame. The phase tells the datapath whether to fill the FIFOs
// (phases 0 .. r-2) or to compute the butterfly (phase r-1). The sequencing
// is this design's own; the document only names the SDF structure.
//
// The sub-stage's output in its phase p is butterfly output q = (p+1) mod r
// of butterfly pos, so the twiddle request is e = q * pos on the block
// length L = r*D. out_start marks the output cycle of the frame's first
// result, (r-1)*D cycles after start, when phase r-1 is first reached.
module sdf_ctrl
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          radix3,    // 1: radix-3, 0: radix-2
  input  logic [CW-1:0] d,         // feedback delay D >= 1
  input  logic          start,     // first sample of a frame is at the input
  output logic [1:0]    phase,
  output logic [CW-1:0] e,         // twiddle exponent of the current output
  output logic          out_start
);
  logic [CW-1:0] pos, pos_q;
  logic [1:0]    phase_q;
  logic          armed_q;
  logic [1:0]    q;

  // phase and pos of the current cycle (restart at a frame start)
  always_comb begin
    if (start) begin
      pos   = '0;
      phase = 2'd0;
    end else begin
      pos   = pos_q;
      phase = phase_q;
    end
    case (phase)
      2'd0:    q = 2'd1;
      2'd1:    q = radix3 ? 2'd2 : 2'd0;
      default: q = 2'd0;
    endcase
    e = (q == 2'd2) ? CW'({pos, 1'b0}) : (q == 2'd1) ? pos : '0;
    out_start = armed_q && (phase == (radix3 ? 2'd2 : 2'd1)) && (pos == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q   <= '0;
      phase_q <= 2'd0;
      armed_q <= 1'b0;
    end else begin
      if (pos == d - 1'b1) begin
        pos_q   <= '0;
        phase_q <= (phase == (radix3 ? 2'd2 : 2'd1)) ? 2'd0 : phase + 2'd1;
      end else begin
        pos_q   <= pos + 1'b1;
        phase_q <= phase;
      end
      if (start)          armed_q <= 1'b1;
      else if (out_start) armed_q <= 1'b0;
    end
  end
endmodule
