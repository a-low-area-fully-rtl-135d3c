// tb_twiddle_unit: checks the twiddle-factor unit against cos/sin.
//
// Every cycle all twelve request ports get a random block length
// L = 2^la * 3^lb (one of the lengths a sub-stage can have, L <= 2048) and a
// random exponent 0 <= e < L; each returned factor must match
// round(32767 * (cos(2*pi*e/L) - j*sin(2*pi*e/L))) within 2 LSB. The edge
// cases e = 0 (must be exactly 32767 + j0) and e = L/4, L/2, 3L/4 where they
// exist are included.
module tb_twiddle_unit;
  import fft_pkg::*;

  localparam int NREQ = 12;
  localparam int TOL  = 2;

  tw_req_t req [NREQ];
  cplx_t   tw  [NREQ];

  twiddle_unit dut (.req(req), .tw(tw));

  int checks = 0, failures = 0;
  bit done = 1'b0;

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int lenof(int la, int lb);
    return (1 << la) * (3 ** lb);
  endfunction

  initial begin
    for (int it = 0; it < 400; it++) begin
      int la [NREQ], lb [NREQ], e [NREQ];
      for (int i = 0; i < NREQ; i++) begin
        do begin
          la[i] = $urandom_range(11);
          lb[i] = $urandom_range(5);
        end while (lenof(la[i], lb[i]) > 2048);
        case ($urandom_range(7))
          0:       e[i] = 0;
          1:       e[i] = lenof(la[i], lb[i]) / 4;
          2:       e[i] = lenof(la[i], lb[i]) / 2;
          3:       e[i] = 3 * lenof(la[i], lb[i]) / 4;
          default: e[i] = $urandom_range(lenof(la[i], lb[i]) - 1);
        endcase
        req[i] = '{e: CW'(e[i]), la: 4'(la[i]), lb: 3'(lb[i])};
      end
      #10;
      for (int i = 0; i < NREQ; i++) begin
        real ang, wr, wi;
        int  dr, di;
        logic signed [DW-1:0] gr, gi;
        ang = 2.0 * 3.14159265358979323846 * real'(e[i]) / real'(lenof(la[i], lb[i]));
        wr  = 32767.0 * $cos(ang);
        wi  = -32767.0 * $sin(ang);
        gr  = tw[i].re;
        gi  = tw[i].im;
        dr  = int'(real'(gr) - wr); if (dr < 0) dr = -dr;
        di  = int'(real'(gi) - wi); if (di < 0) di = -di;
        checks++;
        if (dr > TOL || di > TOL || (e[i] == 0 && (gr != 16'sd32767 || gi != 16'sd0))) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH e=%0d L=%0d: got (%0d,%0d) want (%0.1f,%0.1f)",
                     e[i], lenof(la[i], lb[i]), gr, gi, wr, wi);
        end
      end
    end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
