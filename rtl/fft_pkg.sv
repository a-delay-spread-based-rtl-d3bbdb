// fft_pkg -- shared types and constants of the reconfigurable radix-4 FFT.
//
// The processor is a five-stage radix-4 single-path pipeline for 1024 points
// that can also run as a 256-, 64- or 16-point FFT by entering the pipeline
// at stage 2, 3 or 4. This package holds what every block shares: the complex
// sample type, the FFT-size encoding, the seven control signals C1..C7 that
// the controller sends to each stage, and the FIFO length N_t of each stage.
//
// Word lengths are this design's choice (the architecture does not fix them):
// 16-bit two's complement real and imaginary parts, and 16-bit twiddle
// factors with 14 fraction bits so that +1.0 is exact.
package fft_pkg;

  localparam int DATA_W   = 16;        // bits per real / imaginary part
  localparam int TW_W     = 16;        // bits per twiddle component
  localparam int TW_FRAC  = TW_W - 2;  // twiddle fraction bits (1.0 = 2**14)
  localparam int NSTAGES  = 5;         // radix-4 stages for 1024 points
  localparam int BIN_W    = 10;        // bin index width, log2(1024)
  localparam int TWA_W    = 10;        // twiddle exponent width (log2(4*256))

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // FFT size as selected from outside; the value is the index of the first
  // active stage counted from the output end.
  typedef enum logic [1:0] {
    FFT16   = 2'd0,
    FFT64   = 2'd1,
    FFT256  = 2'd2,
    FFT1024 = 2'd3
  } fft_size_e;

  // Control word of one stage: C1..C3 steer the commutator multiplexers
  // (thermometer code of the butterfly output index q), C4..C7 tell the
  // butterfly which of its four outputs to form (one-hot q).
  typedef struct packed {
    logic [3:0] q_onehot;  // C7..C4
    logic [2:0] sel;       // C3..C1
  } stage_ctrl_t;

  // FIFO length N_t of stage t (1-based, stage 1 at the input): 4**(5-t).
  function automatic int stage_nt(input int t);
    return 1 << (2 * (NSTAGES - t));
  endfunction

  // Latency of stage t in pipeline advances: from a sample at the stage
  // input to the matching output word at the next stage's input.
  function automatic int stage_latency(input int t);
    return 3 * stage_nt(t) + ((t == NSTAGES) ? 1 : 2);
  endfunction

  // Number of points for a size code.
  function automatic int fft_points(input fft_size_e s);
    return 16 << (2 * int'(s));
  endfunction

endpackage
