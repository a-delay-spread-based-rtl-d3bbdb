// tb_r4_butterfly -- self-checking test of the one-output radix-4 butterfly.
//
// For random operand groups x_e (e = 0..3) and each output index q, the
// operands are presented in the commutator's rotated order (O(i+1) = x_((q-i)
// mod 4)) and the output is compared with X_q = sum_e x_e * exp(-j*pi/2*e*q),
// formed with integer cosine/sine tables, divided by 4 with rounding half
// up and saturated. Includes full-scale groups that hit the saturation.
module tb_r4_butterfly;
  import fft_pkg::*;

  cplx_t      o [4];
  logic [3:0] q_onehot;
  cplx_t      y;

  r4_butterfly dut (.o, .q_onehot, .y);

  int checks = 0, failures = 0;
  int cs [4] = '{1, 0, -1, 0};     // cos(pi/2*r)
  int sn [4] = '{0, 1, 0, -1};     // sin(pi/2*r)

  function automatic int sat(input int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int div4(input int s);   // floor((s+2)/4)
    int t = s + 2;
    return (t >= 0) ? t / 4 : -((-t + 3) / 4);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [4], xi [4];
    for (int it = 0; it < 500; it++) begin
      for (int e = 0; e < 4; e++) begin
        if (it < 20) begin
          xr[e] = (it % 2 != 0) ? 32767 : -32768;
          xi[e] = (it % 4 < 2) ? -32768 : 32767;
        end else begin
          xr[e] = int'(sample_t'($urandom));
          xi[e] = int'(sample_t'($urandom));
        end
      end
      for (int q = 0; q < 4; q++) begin
        int sr, si, r;
        sr = 0; si = 0;
        for (int e = 0; e < 4; e++) begin
          r  = (e * q) % 4;
          // (xr + j xi) * (cos - j sin)(pi/2 r)
          sr += xr[e] * cs[r] + xi[e] * sn[r];
          si += xi[e] * cs[r] - xr[e] * sn[r];
        end
        for (int i = 0; i < 4; i++) begin
          int e;
          e = (q - i + 4) % 4;
          o[i].re = sample_t'(xr[e]);
          o[i].im = sample_t'(xi[e]);
        end
        q_onehot = 4'b0001 << q;
        #1;
        checks++;
        if (int'(y.re) != sat(div4(sr)) || int'(y.im) != sat(div4(si))) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d: got %0d,%0d exp %0d,%0d", q, y.re, y.im, sat(div4(sr)), sat(div4(si)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
