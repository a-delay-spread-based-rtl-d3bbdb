// stage_fsm -- control state machine of one pipeline stage.
//
// The state is a modulo-4*NT count c of the samples entering the stage
// (c = 0 for the first sample of a frame). It is decoded into the stage's
// seven control signals and the twiddle exponent:
//   q = (c / NT + 1) mod 4      butterfly output being formed
//   n =  c mod NT               index inside the butterfly group
//   C1..C3 = {q==3, q>=2, q>=1} commutator multiplexer selects
//   C4..C7 = one-hot q          butterfly output select
//   tw_addr = q * n             exponent of W_(4NT) for the multiplier
// All outputs are combinational from the count and belong to the sample
// now at the stage input. restart loads the count with init (minus the
// latency of the active stages ahead, modulo 4*NT) so that count 0 meets
// the first sample of a frame; otherwise the count steps on each advance.
// The counter form and these encodings are this design's choice; the
// architecture only fixes one FSM with C1..C7 per stage.
module stage_fsm
  import fft_pkg::*;
#(
  parameter int unsigned NT = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [TWA_W-1:0] init,
  input  logic             en,
  output stage_ctrl_t      ctrl,
  output logic [TWA_W-1:0] tw_addr
);

  localparam int unsigned CW = $clog2(4 * NT);
  localparam int unsigned NW = (NT > 1) ? $clog2(NT) : 1;

  logic [CW-1:0] cnt;
  logic [1:0]    q;
  logic [NW-1:0] n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       cnt <= '0;
    else if (restart) cnt <= init[CW-1:0];
    else if (en)      cnt <= cnt + 1'b1;

  always_comb begin
    q = cnt[CW-1 -: 2] + 2'd1;
    n = (NT > 1) ? NW'(cnt) : '0;
    ctrl.sel      = {q == 2'd3, q[1], q != 2'd0};
    ctrl.q_onehot = 4'b0001 << q;
    tw_addr       = TWA_W'(n) * TWA_W'(q);
  end

endmodule
