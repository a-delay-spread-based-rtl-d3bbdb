// r4_butterfly -- radix-4 butterfly forming one output per clock.
//
// For one butterfly group x(n + e*NT), e = 0..3, the decimation-in-frequency
// outputs are X_q = sum_e x(n + e*NT) * (-j)^(e*q), q = 0..3. The commutator
// presents the group for four quarters of NT clocks, and in quarter q its
// output O(i+1) holds element e = (q - i) mod 4; the butterfly therefore
// applies to each operand the trivial rotation (-j)^(e*q mod 4) (a swap of
// real and imaginary parts and/or a negation, no multiplier) and adds all
// four. q arrives one-hot as the control signals C4..C7.
// The sum grows by two bits; it is divided by 4 (round half up) and
// saturated back to DATA_W bits, so an N-point FFT delivers DFT/N. Scaling
// and rounding are this design's choice. Purely combinational.
module r4_butterfly
  import fft_pkg::*;
(
  input  cplx_t      o [4],      // O1..O4 from the commutator
  input  logic [3:0] q_onehot,   // C4..C7
  output cplx_t      y
);

  localparam int SUM_W = DATA_W + 3;
  typedef logic signed [SUM_W-1:0] acc_t;

  function automatic sample_t scale_sat(input acc_t s);
    acc_t r;
    r = (s + acc_t'(2)) >>> 2;
    if (r > acc_t'(2 ** (DATA_W - 1) - 1))       return sample_t'(2 ** (DATA_W - 1) - 1);
    else if (r < -acc_t'(2 ** (DATA_W - 1)))     return sample_t'(-(2 ** (DATA_W - 1)));
    else                                         return sample_t'(r);
  endfunction

  logic [1:0] q;
  always_comb begin
    unique case (1'b1)
      q_onehot[1]: q = 2'd1;
      q_onehot[2]: q = 2'd2;
      q_onehot[3]: q = 2'd3;
      default:     q = 2'd0;
    endcase
  end

  acc_t sum_re, sum_im;

  always_comb begin
    logic [1:0] e, rot;
    acc_t a_re, a_im;
    sum_re = '0;
    sum_im = '0;
    for (int i = 0; i < 4; i++) begin
      e    = q - 2'(i);
      rot  = 2'(e * q);
      a_re = acc_t'(o[i].re);
      a_im = acc_t'(o[i].im);
      unique case (rot)
        2'd0: begin sum_re += a_re; sum_im += a_im; end   // * 1
        2'd1: begin sum_re += a_im; sum_im -= a_re; end   // * -j
        2'd2: begin sum_re -= a_re; sum_im -= a_im; end   // * -1
        2'd3: begin sum_re -= a_im; sum_im += a_re; end   // * +j
      endcase
    end
  end

  assign y.re = scale_sat(sum_re);
  assign y.im = scale_sat(sum_im);

endmodule
