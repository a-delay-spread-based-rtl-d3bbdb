// ffsm -- FFT state machine: size selection and control of all stages.
//
// Holds the selected FFT size and derives from it
//   * the bypass selects S_256, S_64, S_16 of MUX I, II, III (1 = feed the
//     processor input into stage 2, 3, 4 instead of the previous stage),
//   * the enables of the gated clocks G_ck1..G_ck3 of stages 1..3, which are
//     off for stages that lie ahead of the entry point,
//   * through one stage_fsm per stage, the control word C1..C7 and the
//     twiddle exponent of every stage.
// Size change: a size_load pulse stores size_sel; the following clock is a
// restart cycle in which in_ready is low, every stage counter is loaded so
// that the next accepted sample is sample 0 of a frame, and the data still
// in the pipeline is dropped. Reset acts like a load of the 1024-point size.
// Streaming: the pipeline advances by one sample on every clock with
// in_valid & in_ready (adv). Frames follow each other without gaps. A word
// leaves the last stage L advances after its frame's first sample entered
// (L = sum of the active stages' latencies, e.g. 1032 for 1024 points);
// out_valid marks each clock on which the output register holds a new
// result word, and out_bin gives its frequency bin: the pipeline delivers
// bins in base-4 digit-reversed order.
// The encodings, the restart cycle and out_valid/out_bin are this design's
// choices; one FSM per stage generating C1..C7 follows the architecture.
module ffsm
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             size_load,
  input  fft_size_e        size_sel,
  input  logic             in_valid,
  output logic             in_ready,
  output logic             adv,
  output fft_size_e        size,
  output logic             s_256,
  output logic             s_64,
  output logic             s_16,
  output logic [2:0]       gck_en,            // G_ck1..G_ck3 enables
  output stage_ctrl_t      ctrl    [NSTAGES],
  output logic [TWA_W-1:0] tw_addr [NSTAGES],
  output logic             out_valid,
  output logic [BIN_W-1:0] out_bin
);

  // First active stage (1-based) for a size.
  function automatic int first_stage(input fft_size_e s);
    return NSTAGES - 1 - int'(s);
  endfunction

  // Latency of the active stages ahead of stage t.
  function automatic int lat_before(input fft_size_e s, input int t);
    int l = 0;
    for (int k = 1; k < t; k++)
      if (k >= first_stage(s)) l += stage_latency(k);
    return l;
  endfunction

  function automatic int lat_total(input fft_size_e s);
    return lat_before(s, NSTAGES + 1);
  endfunction

  logic restart;       // restart cycle
  logic active [NSTAGES];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      size    <= FFT1024;
      restart <= 1'b1;
    end else begin
      restart <= size_load;
      if (size_load) size <= size_sel;
    end

  assign in_ready = !restart;
  assign adv      = in_valid && in_ready;

  assign s_256 = (size == FFT256);
  assign s_64  = (size == FFT64);
  assign s_16  = (size == FFT16);

  for (genvar t = 1; t <= NSTAGES; t++) begin : g_stage
    logic [TWA_W-1:0] init;

    assign active[t-1] = (t >= first_stage(size));
    // Count 0 meets sample 0: start at minus the upstream latency.
    assign init = TWA_W'(-lat_before(size, t));

    stage_fsm #(.NT(stage_nt(t))) u_fsm (
      .clk    (clk),
      .rst_n  (rst_n),
      .restart(restart),
      .init   (init),
      .en     (adv && active[t-1]),
      .ctrl   (ctrl[t-1]),
      .tw_addr(tw_addr[t-1])
    );
  end

  assign gck_en = {active[2], active[1], active[0]};

  // ---- output framing ----
  localparam int CNT_W = 11;
  logic [CNT_W-1:0] adv_cnt;      // advances since restart, saturating at L-1
  logic [CNT_W-1:0] last_fill;
  logic [BIN_W-1:0] out_pos;      // position of the output word in its frame
  logic [BIN_W-1:0] pos_mask;
  logic             running;

  assign last_fill = CNT_W'(lat_total(size) - 1);
  assign pos_mask  = BIN_W'(fft_points(size) - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      adv_cnt   <= '0;
      out_valid <= 1'b0;
      out_pos   <= '0;
      running   <= 1'b0;
    end else if (restart) begin
      adv_cnt   <= '0;
      out_valid <= 1'b0;
      out_pos   <= '0;
      running   <= 1'b0;
    end else begin
      out_valid <= adv && (adv_cnt == last_fill);
      if (adv && adv_cnt != last_fill) adv_cnt <= adv_cnt + 1'b1;
      if (adv && adv_cnt == last_fill) begin
        if (running) out_pos <= (out_pos + 1'b1) & pos_mask;
        running <= 1'b1;
      end
    end

  // Handshake rules: a size load is followed by a restart cycle that takes
  // no sample, and a result is flagged only right after an accepted sample.
  a_restart_blocks_input: assert property (@(posedge clk) disable iff (!rst_n)
    size_load |=> !in_ready && !adv);
  a_valid_after_advance: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(adv));

  // Bin of the output word: base-4 digit reversal of out_pos over the
  // log4(points) digits of the current size.
  always_comb begin
    int nd;
    nd      = int'(size) + 2;
    out_bin = '0;
    for (int d = 0; d < BIN_W / 2; d++)
      if (d < nd)
        out_bin[2*(nd-1-d) +: 2] = out_pos[2*d +: 2];
  end

endmodule
