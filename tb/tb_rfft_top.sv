// tb_rfft_top -- end-to-end test of the reconfigurable FFT processor.
//
// Runs the processor at its default sizes in all four configurations, in the
// order 16, 64, 256, 1024, 16 points (so every bypass multiplexer and every
// clock gate is switched on and off at least once). For each size it streams
// a few frames of random complex samples with random gaps in in_valid, then
// padding, and compares every result word with a directly evaluated DFT
// divided by the number of points, within a rounding tolerance. It also
// checks the bin order (base-4 digit reversal), the latency in accepted
// samples (1032 / 262 / 68 / 18), the bypass selects and clock-gate enables
// for each size, and counts how often each mechanism occurred: a size
// switch, an input gap (stall), each entry multiplexer, each stage clock
// being gated off. A mechanism that never occurs counts as a failure.
module tb_rfft_top;
  import fft_pkg::*;

  localparam int FRAMES = 3;
  localparam int TOL    = 3;      // LSB tolerance per component

  logic             clk = 1'b0;
  logic             rst_n;
  logic             size_load;
  logic [1:0]       size_sel;
  logic             in_valid, in_ready, out_valid;
  cplx_t            in_data, out_data;
  logic [BIN_W-1:0] out_bin;
  logic [1:0]       size;
  logic [2:0]       stage_clk_on;
  logic [2:0]       entry_sel;

  rfft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_switch = 0, n_stall = 0, n_mux1 = 0, n_mux2 = 0, n_mux3 = 0;
  int n_gate_off [3] = '{0, 0, 0};
  int max_err = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus storage: samples of the frames of the current run
  int xin_re [FRAMES*1024];
  int xin_im [FRAMES*1024];

  function automatic int digrev(input int p, input int nd);
    int r = 0;
    for (int d = 0; d < nd; d++) r |= ((p >> (2*d)) & 3) << (2*(nd-1-d));
    return r;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  // reference DFT bin k of frame f, divided by npts
  task automatic ref_bin(input int f, input int k, input int npts, output real rr, output real ri);
    real ang;
    rr = 0.0; ri = 0.0;
    for (int n = 0; n < npts; n++) begin
      ang = -2.0 * 3.14159265358979323846 * real'((n * k) % npts) / real'(npts);
      rr += real'(xin_re[f*npts+n]) * $cos(ang) - real'(xin_im[f*npts+n]) * $sin(ang);
      ri += real'(xin_re[f*npts+n]) * $sin(ang) + real'(xin_im[f*npts+n]) * $cos(ang);
    end
    rr = rr / real'(npts);
    ri = ri / real'(npts);
  endtask

  // output checker, armed per run
  int  run_npts = 16, run_nd = 2, run_lat = 18, out_cnt = 0, acc_cnt = 0;
  int  first_out_acc = -1;
  bit  collecting = 0;

  always @(posedge clk) begin
    if (out_valid && collecting && out_cnt < FRAMES*run_npts) begin
      int f, p, k, e;
      real rr, ri;
      f = out_cnt / run_npts;
      p = out_cnt % run_npts;
      k = digrev(p, run_nd);
      if (out_cnt == 0) first_out_acc = acc_cnt;
      check(int'(out_bin) == k, $sformatf("bin order n=%0d p=%0d got %0d exp %0d", run_npts, p, out_bin, k));
      ref_bin(f, k, run_npts, rr, ri);
      e = $rtoi($floor((rr > real'(out_data.re) ? rr - real'(out_data.re) : real'(out_data.re) - rr) + 0.5));
      if (e > max_err) max_err = e;
      check(e <= TOL, $sformatf("re n=%0d f=%0d k=%0d got %0d exp %f", run_npts, f, k, out_data.re, rr));
      e = $rtoi($floor((ri > real'(out_data.im) ? ri - real'(out_data.im) : real'(out_data.im) - ri) + 0.5));
      if (e > max_err) max_err = e;
      check(e <= TOL, $sformatf("im n=%0d f=%0d k=%0d got %0d exp %f", run_npts, f, k, out_data.im, ri));
      out_cnt++;
    end
    if (in_valid && in_ready && collecting) acc_cnt++;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && entry_sel[2]) n_mux1++;
    if (in_valid && in_ready && entry_sel[1])  n_mux2++;
    if (in_valid && in_ready && entry_sel[0])  n_mux3++;
    for (int t = 0; t < 3; t++) if (!stage_clk_on[t]) n_gate_off[t]++;
  end

  task automatic run_size(input int code);
    int npts, lat, total, fed, gap_ok;
    npts = 16 << (2*code);
    lat  = (code == 3) ? 1032 : (code == 2) ? 262 : (code == 1) ? 68 : 18;
    // switch size
    @(negedge clk);
    size_load = 1'b1; size_sel = 2'(code);
    @(negedge clk);
    size_load = 1'b0;
    n_switch++;
    check(in_ready == 1'b0, "in_ready low in restart cycle");
    @(negedge clk);
    check(int'(size) == code, "size register");
    check(stage_clk_on == ((code == 3) ? 3'b111 : (code == 2) ? 3'b110 : (code == 1) ? 3'b100 : 3'b000),
          $sformatf("clock gate enables for %0d points: %b", npts, stage_clk_on));
    check(entry_sel == ((code == 2) ? 3'b100 : (code == 1) ? 3'b010 : (code == 0) ? 3'b001 : 3'b000),
          "bypass selects");
    for (int i = 0; i < FRAMES*npts; i++) begin
      xin_re[i] = $urandom_range(0, 32767) - 16384;
      xin_im[i] = $urandom_range(0, 32767) - 16384;
    end
    run_npts = npts; run_nd = code + 2; run_lat = lat;
    out_cnt = 0; acc_cnt = 0; first_out_acc = -1; collecting = 1;
    total = FRAMES*npts + lat + 8;
    fed = 0;
    while (out_cnt < FRAMES*npts && fed < total + 10) begin
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        n_stall++;
      end else begin
        in_valid = 1'b1;
        in_data.re = (fed < FRAMES*npts) ? sample_t'(xin_re[fed]) : '0;
        in_data.im = (fed < FRAMES*npts) ? sample_t'(xin_im[fed]) : '0;
        fed++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    @(negedge clk);
    collecting = 0;
    check(out_cnt == FRAMES*npts, $sformatf("all %0d results of %0d points seen (%0d)", FRAMES*npts, npts, out_cnt));
    check(first_out_acc == lat, $sformatf("latency %0d points: %0d samples, expected %0d", npts, first_out_acc, lat));
    $display("size %0d: %0d results, latency %0d, max error so far %0d", npts, out_cnt, first_out_acc, max_err);
  endtask

  initial begin
    rst_n = 1'b0; size_load = 1'b0; size_sel = 2'd3; in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_size(0);
    run_size(1);
    run_size(2);
    run_size(3);
    run_size(0);
    check(n_switch >= 5, "size switches");
    check(n_stall > 0, "input stalls");
    check(n_mux1 > 0, "MUX I used");
    check(n_mux2 > 0, "MUX II used");
    check(n_mux3 > 0, "MUX III used");
    for (int t = 0; t < 3; t++) check(n_gate_off[t] > 0, $sformatf("G_ck%0d gated off", t+1));
    $display("switches=%0d stalls=%0d mux1=%0d mux2=%0d mux3=%0d gated_off=%0d/%0d/%0d max_err=%0d",
             n_switch, n_stall, n_mux1, n_mux2, n_mux3, n_gate_off[0], n_gate_off[1], n_gate_off[2], max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
