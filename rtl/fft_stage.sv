// fft_stage -- one stage of the radix-4 single-path pipeline.
//
// Commutator -> butterfly -> complex twiddle multiplier, as in the general
// stage of the architecture; the last stage (HAS_MULT = 0) has only the
// commutator and the butterfly. The stage takes one complex sample per
// advance (en = 1) and delivers one per advance. For every group of 4*NT
// input samples it outputs the four NT-sample blocks X_0(n), X_1(n), X_2(n),
// X_3(n) (n = 0..NT-1), each rotated by W_(4NT)^(q*n), which are the inputs
// of the four 4*NT/4-point sub-transforms of the next stage.
// ctrl (C1..C7) and tw_addr come from the stage's FSM and refer to the
// sample currently on din. Pipeline registers (this design's choice): one
// after the butterfly, one after the multiplier. Latency: the output for
// butterfly group n appears at dout 3*NT + 2 advances after x(n) was on din
// (3*NT + 1 without the multiplier).
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned NT       = 256,
  parameter bit          HAS_MULT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  stage_ctrl_t      ctrl,
  input  logic [TWA_W-1:0] tw_addr,
  input  cplx_t            din,
  output cplx_t            dout
);

  cplx_t opnd [4];
  cplx_t bf_y, bf_q;

  commutator #(.NT(NT)) u_comm (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .din  (din),
    .sel  (ctrl.sel),
    .o    (opnd)
  );

  r4_butterfly u_bf (
    .o       (opnd),
    .q_onehot(ctrl.q_onehot),
    .y       (bf_y)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  bf_q <= '0;
    else if (en) bf_q <= bf_y;

  if (HAS_MULT) begin : g_mult
    twiddle_mult #(.NT(NT)) u_mult (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .tw_addr(tw_addr),
      .din    (bf_q),
      .dout   (dout)
    );
  end else begin : g_nomult
    assign dout = bf_q;
  end

endmodule
