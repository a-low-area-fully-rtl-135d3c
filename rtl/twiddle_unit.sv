// twiddle_unit: the twiddle-factor generator shared by the super stages.
//
// Each super stage has three twiddle multipliers (CM4, CM6 and CM8 of its
// processing element); each one presents a request {e, la, lb} every cycle
// and receives W_L^e, L = 2^la * 3^lb, in the same cycle (the unit is
// combinational). NREQ requests are served in parallel by one twiddle_gen
// each. A request with e = 0 returns 1.0 (32767).
module twiddle_unit
  import fft_pkg::*;
#(
  parameter int unsigned NREQ = NSTAGE * 3
) (
  input  tw_req_t req [NREQ],
  output cplx_t   tw  [NREQ]
);
  for (genvar i = 0; i < NREQ; i++) begin : g_gen
    twiddle_gen u_gen (.req(req[i]), .w(tw[i]));
  end
endmodule
