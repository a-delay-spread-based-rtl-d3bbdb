// tb_workload_4000 -- 4000 random samples through each FFT length.
//
// For each of the four sizes (1024, 256, 64, 16 points) the processor is
// fed 4000 uniformly distributed random complex samples back to back, one
// per clock, followed by zero padding until every complete frame has left
// the pipeline (3, 15, 62 and 250 frames). Every result of a complete frame
// is compared with a directly evaluated DFT divided by the number of points
// (tolerance 3 LSB). During each run the TB also counts the clock edges that
// reach stages 1, 2 and 3 through their clock gates: a stage ahead of the
// entry point must receive none, an active one one per clock. The counts
// show how much of the pipeline is clocked at each size.
module tb_workload_4000;
  import fft_pkg::*;

  localparam int NSAMP = 4000;
  localparam int TOL   = 3;

  logic             clk = 1'b0;
  logic             rst_n, size_load, in_valid, in_ready, out_valid;
  logic [1:0]       size_sel, size;
  cplx_t            in_data, out_data;
  logic [BIN_W-1:0] out_bin;
  logic [2:0]       stage_clk_on, entry_sel;

  rfft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NSAMP], xi [NSAMP];
  int edges [3], clocks;
  bit counting = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dut.g_gate[0].u_cg.gclk) if (counting) edges[0]++;
  always @(posedge dut.g_gate[1].u_cg.gclk) if (counting) edges[1]++;
  always @(posedge dut.g_gate[2].u_cg.gclk) if (counting) edges[2]++;
  always @(posedge clk) if (counting) clocks++;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run(input int code);
    int npts, nfr, nout, fed, f, k;
    real rr, ri, a;
    npts = 16 << (2*code);
    nfr  = NSAMP / npts;
    for (int i = 0; i < NSAMP; i++) begin
      xr[i] = $urandom_range(0, 32767) - 16384;
      xi[i] = $urandom_range(0, 32767) - 16384;
    end
    @(negedge clk);
    size_load = 1'b1; size_sel = 2'(code);
    @(negedge clk);
    size_load = 1'b0;
    @(negedge clk);
    edges = '{0, 0, 0}; clocks = 0; counting = 1;
    nout = 0; fed = 0;
    while (nout < nfr*npts) begin
      in_valid   = 1'b1;
      in_data.re = (fed < NSAMP) ? sample_t'(xr[fed]) : '0;
      in_data.im = (fed < NSAMP) ? sample_t'(xi[fed]) : '0;
      fed++;
      @(negedge clk);
      if (out_valid) begin
        f  = nout / npts;
        k  = int'(out_bin);
        rr = 0.0; ri = 0.0;
        for (int n = 0; n < npts; n++) begin
          a  = -2.0 * 3.14159265358979323846 * real'((n * k) % npts) / real'(npts);
          rr += real'(xr[f*npts+n]) * $cos(a) - real'(xi[f*npts+n]) * $sin(a);
          ri += real'(xr[f*npts+n]) * $sin(a) + real'(xi[f*npts+n]) * $cos(a);
        end
        rr = rr / real'(npts); ri = ri / real'(npts);
        check(absi(int'(out_data.re) - $rtoi($floor(rr + 0.5))) <= TOL &&
              absi(int'(out_data.im) - $rtoi($floor(ri + 0.5))) <= TOL,
              $sformatf("%0d points frame %0d bin %0d: got %0d,%0d exp %f,%f", npts, f, k, out_data.re, out_data.im, rr, ri));
        nout++;
      end
    end
    in_valid = 1'b0;
    counting = 0;
    for (int t = 0; t < 3; t++) begin
      if (t >= 3 - code) check(edges[t] == clocks, $sformatf("stage %0d clocked on every cycle", t+1));
      else               check(edges[t] == 0, $sformatf("stage %0d gated off at %0d points", t+1, npts));
    end
    $display("%4d points: %0d frames checked, %0d clocks, stage 1/2/3 clock edges %0d/%0d/%0d",
             npts, nfr, clocks, edges[0], edges[1], edges[2]);
  endtask

  initial begin
    rst_n = 1'b0; size_load = 1'b0; size_sel = 2'd3; in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(3); run(2); run(1); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
