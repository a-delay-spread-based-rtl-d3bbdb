// commutator -- radix-4 commutator of one pipeline stage.
//
// Converts the serial stage input into the four operands of the radix-4
// butterfly. Six FIFOs of NT words are chained: three from the input give
// taps delayed by 0, NT, 2NT and 3NT samples, three more after the third
// give 4NT, 5NT and 6NT. O1 is always the 3NT tap. Three 2:1 multiplexers,
// steered by the control signals C1..C3 (sel[0..2]), choose
//   O2 from {0, 4NT}, O3 from {NT, 5NT}, O4 from {2NT, 6NT}.
// With x(n + e*NT), e = 0..3, the four elements of one butterfly, and q the
// butterfly output being formed, O(i+1) carries element (q - i) mod 4 when
// the selects are the thermometer code C1 = q>=1, C2 = q>=2, C3 = q==3. Each
// group of four elements thus stays available for 4NT samples so that the
// butterfly can form one output per clock. The structure (six FIFOs, three
// multiplexers, O1 unswitched) follows the architecture; the exact tap
// assignment was derived from the radix-4 equations.
// Operands are combinational from the FIFO registers and din.
module commutator
  import fft_pkg::*;
#(
  parameter int unsigned NT = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  cplx_t      din,
  input  logic [2:0] sel,     // C1..C3
  output cplx_t      o [4]    // O1..O4
);

  cplx_t tap [7];             // tap[k] = input delayed by k*NT

  assign tap[0] = din;

  for (genvar k = 1; k <= 6; k++) begin : g_fifo
    delay_fifo #(.DEPTH(NT)) u_fifo (
      .clk (clk),
      .rst_n (rst_n),
      .en  (en),
      .din (tap[k-1]),
      .dout(tap[k])
    );
  end

  always_comb begin
    o[0] = tap[3];
    o[1] = sel[0] ? tap[4] : tap[0];
    o[2] = sel[1] ? tap[5] : tap[1];
    o[3] = sel[2] ? tap[6] : tap[2];
  end

endmodule
