// bypass_mux -- one of the reconfiguration multiplexers MUX I, II, III.
//
// Placed in front of stages 2, 3 and 4. With its select (S_256, S_64 or
// S_16) high it feeds the processor input straight into the following
// stage, so the pipeline starts there and the FFT becomes 256-, 64- or
// 16-point; with the select low it passes the previous stage's output.
// Combinational. Select polarity is this design's choice.
module bypass_mux
  import fft_pkg::*;
(
  input  cplx_t stage_out,
  input  cplx_t fft_in,
  input  logic  sel_in,
  output cplx_t y
);

  always_comb y = sel_in ? fft_in : stage_out;

endmodule
