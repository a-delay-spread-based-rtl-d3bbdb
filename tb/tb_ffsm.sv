// tb_ffsm -- self-checking test of the FFT state machine.
//
// For each size (16, 64, 256, 1024 points, then 16 again) the TB loads the
// size and checks: the restart cycle (in_ready low), the bypass selects
// S_256/S_64/S_16 and the clock-gate enables; then, over a stream of
// advances with random gaps, the control word and twiddle exponent of every
// active stage against the TB's own count of that stage's input samples
// (stage t sees sample 0 after the latencies 3*N_s + 2 of the active stages
// s ahead of it, 3*N_s + 1 for the last stage); the first out_valid exactly
// L advances after the start (L = 1032/262/68/18); and the out_bin sequence
// (base-4 digit reversal of the output count).
module tb_ffsm;
  import fft_pkg::*;

  logic             clk = 1'b0, rst_n, size_load, in_valid, in_ready, adv;
  fft_size_e        size_sel, size;
  logic             s_256, s_64, s_16, out_valid;
  logic [2:0]       gck_en;
  stage_ctrl_t      ctrl    [NSTAGES];
  logic [TWA_W-1:0] tw_addr [NSTAGES];
  logic [BIN_W-1:0] out_bin;

  ffsm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nts [5] = '{256, 64, 16, 4, 1};

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endfunction

  function automatic int digrev(input int p, input int nd);
    int r = 0;
    for (int d = 0; d < nd; d++) r |= ((p >> (2*d)) & 3) << (2*(nd-1-d));
    return r;
  endfunction

  task automatic run(input int code);
    int first, lup [5], ltot, g, nout, npts, first_valid;
    npts  = 16 << (2*code);
    first = 3 - code;              // 0-based first active stage
    ltot  = 0;
    for (int t = 0; t < 5; t++) begin
      lup[t] = ltot;
      if (t >= first) ltot += 3*nts[t] + ((t == 4) ? 1 : 2);
    end
    @(negedge clk);
    size_load = 1'b1; size_sel = fft_size_e'(code);
    @(negedge clk);
    size_load = 1'b0;
    check(!in_ready, "in_ready low during restart");
    @(negedge clk);
    check(in_ready, "in_ready high after restart");
    check({s_256, s_64, s_16} == {code == 2, code == 1, code == 0}, $sformatf("selects for code %0d", code));
    check(gck_en == {code >= 1, code >= 2, code >= 3}, $sformatf("gates for code %0d: %b", code, gck_en));
    g = 0; nout = 0; first_valid = -1;
    while (nout < 2*npts) begin
      in_valid = ($urandom_range(0, 5) != 0);
      #1;
      for (int t = first; t < 5; t++) begin
        int c, q, n;
        c = ((g - lup[t]) % (4*nts[t]) + 4*nts[t]) % (4*nts[t]);
        q = (c / nts[t] + 1) % 4;
        n = c % nts[t];
        check(ctrl[t].sel == {q == 3, q >= 2, q >= 1} && ctrl[t].q_onehot == 4'(1 << q) &&
              int'(tw_addr[t]) == q * n,
              $sformatf("stage %0d ctrl at advance %0d", t+1, g));
      end
      @(negedge clk);
      if (out_valid) begin
        if (first_valid < 0) first_valid = g + 1;   // advances done so far
        check(int'(out_bin) == digrev(nout % npts, code + 2), $sformatf("bin %0d of %0d points: %0d", nout, npts, out_bin));
        nout++;
      end
      if (in_valid) g++;
    end
    in_valid = 1'b0;
    check(first_valid == ltot, $sformatf("first output after %0d advances, expected %0d", first_valid, ltot));
  endtask

  initial begin
    rst_n = 1'b0; size_load = 1'b0; size_sel = FFT1024; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(size == FFT1024, "reset size is 1024 points");
    run(0); run(1); run(2); run(3); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
