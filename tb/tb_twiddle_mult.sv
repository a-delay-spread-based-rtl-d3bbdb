// tb_twiddle_mult -- self-checking test of the twiddle ROM and multiplier.
//
// NT = 16 (64-entry ROM). Random exponents k and random samples, with
// random advance gaps. The exponent is given one advance ahead of the
// sample it applies to: after each advance the output must equal the sample
// taken at that advance times exp(-j*2*pi*k/64), k the exponent taken at the
// advance before, computed in floating point, within 1 LSB.
module tb_twiddle_mult;
  import fft_pkg::*;

  localparam int NT = 16;

  logic             clk = 1'b0, rst_n, en;
  logic [TWA_W-1:0] tw_addr;
  cplx_t            din, dout;

  twiddle_mult #(.NT(NT)) dut (.clk, .rst_n, .en, .tw_addr, .din, .dout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    ks [$];
  cplx_t ds [$];

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    automatic int nadv = 0;
    rst_n = 1'b0; en = 1'b0; din = '0; tw_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      en      = ($urandom_range(0, 3) != 0);
      tw_addr = TWA_W'($urandom_range(0, 4*NT-1));
      din.re  = sample_t'($urandom_range(0, 46000) - 23000);
      din.im  = sample_t'($urandom_range(0, 46000) - 23000);
      @(negedge clk);
      if (en) begin
        ks.push_back(int'(tw_addr));
        ds.push_back(din);
        nadv++;
        // output: sample of this advance times twiddle of the previous exponent
        if (nadv >= 2) begin
          real a, er, ei;
          a  = -2.0 * 3.14159265358979323846 * real'(ks[nadv-2]) / real'(4*NT);
          er = real'(ds[nadv-1].re) * $cos(a) - real'(ds[nadv-1].im) * $sin(a);
          ei = real'(ds[nadv-1].re) * $sin(a) + real'(ds[nadv-1].im) * $cos(a);
          checks++;
          if (absi(int'(dout.re) - $rtoi($floor(er + 0.5))) > 1 ||
              absi(int'(dout.im) - $rtoi($floor(ei + 0.5))) > 1) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d: got %0d,%0d exp %f,%f", ks[nadv-2], dout.re, dout.im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
