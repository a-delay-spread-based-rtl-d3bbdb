// tb_fft_stage -- self-checking test of one radix-4 pipeline stage.
//
// Two stages are tested on the same random stream with random advance gaps:
// NT = 4 with the twiddle multiplier (a 16-point sub-transform stage) and
// NT = 1 without it (the last stage). The TB generates the control words
// from its own sample counter. For every block of 4*NT input samples the
// stage must output X_q(n) * W_(4NT)^(q*n), q = 0..3, n = 0..NT-1, in that
// order, where X_q(n) = (1/4) sum_e x(n + e*NT) exp(-j*pi/2*e*q); the
// reference is computed in floating point (tolerance 2 LSB). The output for
// input sample j must appear 3*NT + 2 advances later (3*NT + 1 without the
// multiplier), which is checked by the stream alignment.
module tb_fft_stage;
  import fft_pkg::*;

  logic             clk = 1'b0, rst_n, en;
  cplx_t            din, dout4, dout1;
  stage_ctrl_t      ctrl4, ctrl1;
  logic [TWA_W-1:0] tw4, tw1;

  fft_stage #(.NT(4), .HAS_MULT(1'b1)) u4 (.clk, .rst_n, .en, .ctrl(ctrl4), .tw_addr(tw4), .din, .dout(dout4));
  fft_stage #(.NT(1), .HAS_MULT(1'b0)) u1 (.clk, .rst_n, .en, .ctrl(ctrl1), .tw_addr(tw1), .din, .dout(dout1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [$], xi [$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  // expected output j of a stage with span nt (mult: apply twiddle)
  task automatic expect_out(input int nt, input bit mult, input int j, output real er, output real ei);
    int b, p, q, n;
    real sr, si, a, tr, ti;
    b = j / (4*nt); p = j % (4*nt); q = p / nt; n = p % nt;
    sr = 0.0; si = 0.0;
    for (int e = 0; e < 4; e++) begin
      a  = -3.14159265358979323846 / 2.0 * real'(e * q);
      sr += real'(xr[4*nt*b + n + e*nt]) * $cos(a) - real'(xi[4*nt*b + n + e*nt]) * $sin(a);
      si += real'(xr[4*nt*b + n + e*nt]) * $sin(a) + real'(xi[4*nt*b + n + e*nt]) * $cos(a);
    end
    sr = sr / 4.0; si = si / 4.0;
    if (mult) begin
      a  = -2.0 * 3.14159265358979323846 * real'(q * n) / real'(4 * nt);
      tr = sr * $cos(a) - si * $sin(a);
      ti = sr * $sin(a) + si * $cos(a);
      sr = tr; si = ti;
    end
    er = sr; ei = si;
  endtask

  task automatic cmp(input cplx_t got, input real er, input real ei, input string name, input int j);
    checks++;
    if (absi(int'(got.re) - $rtoi($floor(er + 0.5))) > 2 || absi(int'(got.im) - $rtoi($floor(ei + 0.5))) > 2) begin
      failures++;
      if (failures < 10) $display("FAIL %s out %0d: got %0d,%0d exp %f,%f", name, j, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    automatic int k = 0;   // index of the sample on din
    rst_n = 1'b0; en = 1'b0; din = '0;
    ctrl4 = '{q_onehot: 4'b0010, sel: 3'b001};
    ctrl1 = '{q_onehot: 4'b0010, sel: 3'b001};
    tw4 = '0; tw1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (k < 400) begin
      int q4, q1;
      en = ($urandom_range(0, 4) != 0);
      din.re = sample_t'($urandom_range(0, 40000) - 20000);
      din.im = sample_t'($urandom_range(0, 40000) - 20000);
      q4 = ((k % 16) / 4 + 1) % 4;
      ctrl4.sel = {q4 == 3, q4 >= 2, q4 >= 1};
      ctrl4.q_onehot = 4'(1 << q4);
      tw4 = TWA_W'(q4 * (k % 4));
      q1 = ((k % 4) + 1) % 4;
      ctrl1.sel = {q1 == 3, q1 >= 2, q1 >= 1};
      ctrl1.q_onehot = 4'(1 << q1);
      tw1 = '0;
      @(negedge clk);
      if (en) begin
        real er, ei;
        xr.push_back(int'(din.re));
        xi.push_back(int'(din.im));
        if (k - 3*4 - 1 >= 0) begin
          expect_out(4, 1'b1, k - 13, er, ei);
          cmp(dout4, er, ei, "NT=4", k - 13);
        end
        if (k - 3 >= 0) begin
          expect_out(1, 1'b0, k - 3, er, ei);
          cmp(dout1, er, ei, "NT=1", k - 3);
        end
        k++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
