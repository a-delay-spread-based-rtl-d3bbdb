// twiddle_mult -- twiddle-factor ROM and complex multiplier of one stage.
//
// Each butterfly output X_q(n) of a stage whose sub-transform has 4*NT points
// is rotated by W^(q*n), W = exp(-j*2*pi/(4*NT)). tw_addr carries the
// exponent q*n (mod 4*NT); it is applied one clock ahead of the data so that
// the synchronous ROM read lines up with the registered butterfly output on
// din. The ROM holds cos and -sin of 2*pi*k/(4*NT), k = 0..4*NT-1, rounded
// to TW_W bits with TW_FRAC fraction bits; it is computed at elaboration.
// The product is rounded (half up), shifted back by TW_FRAC and saturated to
// DATA_W, and registered: dout is valid two advances after tw_addr, one
// after din. ROM format and rounding are this design's choice.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int unsigned NT = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [TWA_W-1:0] tw_addr,
  input  cplx_t            din,
  output cplx_t            dout
);

  localparam int unsigned ROM_D = 4 * NT;
  localparam int unsigned AW    = $clog2(ROM_D);

  typedef logic signed [TW_W-1:0] tw_t;
  typedef logic [2*TW_W-1:0]      rom_t [ROM_D];

  function automatic rom_t make_rom();
    rom_t r;
    real  ang;
    tw_t  c, s;
    for (int k = 0; k < int'(ROM_D); k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(ROM_D);
      c    = tw_t'($rtoi($floor(real'(2 ** TW_FRAC) * $cos(ang) + 0.5)));
      s    = tw_t'($rtoi($floor(-real'(2 ** TW_FRAC) * $sin(ang) + 0.5)));
      r[k] = {c, s};
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  localparam int PROD_W = DATA_W + TW_W + 1;
  typedef logic signed [PROD_W-1:0] prod_t;

  function automatic sample_t round_sat(input prod_t p);
    prod_t r;
    r = (p + prod_t'(2 ** (TW_FRAC - 1))) >>> TW_FRAC;
    if (r > prod_t'(2 ** (DATA_W - 1) - 1))    return sample_t'(2 ** (DATA_W - 1) - 1);
    else if (r < -prod_t'(2 ** (DATA_W - 1)))  return sample_t'(-(2 ** (DATA_W - 1)));
    else                                       return sample_t'(r);
  endfunction

  tw_t   w_re, w_im;
  prod_t p_re, p_im;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  {w_re, w_im} <= {tw_t'(2 ** TW_FRAC), tw_t'(0)};
    else if (en) {w_re, w_im} <= ROM[tw_addr[AW-1:0]];

  always_comb begin
    p_re = prod_t'(din.re) * prod_t'(w_re) - prod_t'(din.im) * prod_t'(w_im);
    p_im = prod_t'(din.re) * prod_t'(w_im) + prod_t'(din.im) * prod_t'(w_re);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  dout <= '0;
    else if (en) dout <= '{re: round_sat(p_re), im: round_sat(p_im)};

endmodule
