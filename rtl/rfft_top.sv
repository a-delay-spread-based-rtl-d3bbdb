// rfft_top -- reconfigurable 1024/256/64/16-point radix-4 pipelined FFT.
//
// Five radix-4 single-path stages with FIFO lengths N_t = 256, 64, 16, 4, 1
// form a 1024-point decimation-in-frequency FFT that takes and delivers one
// complex sample per clock. The size is cut to 256, 64 or 16 points by
// entering the pipeline further down: MUX I, II and III (selects S_256,
// S_64, S_16) route the processor input into stage 2, 3 or 4, and the clocks
// of the stages ahead of the entry point are switched off by the gates
// G_ck1..G_ck3, which is where the power saving comes from. The FFT state
// machine (ffsm) derives all selects, clock enables and per-stage control
// words C1..C7 from the size input.
// Interface: size_load/size_sel choose the size (takes effect after one
// restart cycle with in_ready low; data in flight is dropped). A sample is
// taken on each clock with in_valid && in_ready; frames follow back to back.
// size, stage_clk_on and entry_sel show the size, clock-gate enables and
// entry selects in use. Results: out_valid marks a new output word
// out_data, of frequency bin out_bin; bins come in base-4 digit-reversed order and are scaled by
// 1/points. Latency from the first sample of a frame to its first result:
// 1032, 262, 68 or 18 accepted samples for 1024, 256, 64, 16 points (the
// pipeline moves only when samples are accepted, so the last frame drains
// as the next one, or padding, is fed in).
module rfft_top
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             size_load,
  input  logic [1:0]       size_sel,    // 0:16 1:64 2:256 3:1024 points
  input  logic             in_valid,
  output logic             in_ready,
  input  cplx_t            in_data,
  output logic             out_valid,
  output cplx_t            out_data,
  output logic [BIN_W-1:0] out_bin,
  output logic [1:0]       size,        // size in use
  output logic [2:0]       stage_clk_on, // G_ck1..G_ck3 enables
  output logic [2:0]       entry_sel     // {S_256, S_64, S_16}
);

  logic             adv;
  logic             s_256, s_64, s_16;
  logic [2:0]       gck_en;
  stage_ctrl_t      ctrl    [NSTAGES];
  logic [TWA_W-1:0] tw_addr [NSTAGES];
  fft_size_e        size_e;
  logic             sclk  [NSTAGES];
  cplx_t            s_in  [NSTAGES];
  cplx_t            s_out [NSTAGES];

  ffsm u_ffsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .size_load(size_load),
    .size_sel (fft_size_e'(size_sel)),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .adv      (adv),
    .size     (size_e),
    .s_256    (s_256),
    .s_64     (s_64),
    .s_16     (s_16),
    .gck_en   (gck_en),
    .ctrl     (ctrl),
    .tw_addr  (tw_addr),
    .out_valid(out_valid),
    .out_bin  (out_bin)
  );

  assign size         = size_e;
  assign stage_clk_on = gck_en;
  assign entry_sel    = {s_256, s_64, s_16};

  // Gated clocks of stages 1..3; stages 4 and 5 run whenever the FFT runs.
  for (genvar t = 0; t < 3; t++) begin : g_gate
    clock_gate u_cg (.clk(clk), .en(gck_en[t]), .gclk(sclk[t]));
  end
  assign sclk[3] = clk;
  assign sclk[4] = clk;

  // Entry points: MUX I, II, III in front of stages 2, 3, 4.
  assign s_in[0] = in_data;
  bypass_mux u_mux1 (.stage_out(s_out[0]), .fft_in(in_data), .sel_in(s_256), .y(s_in[1]));
  bypass_mux u_mux2 (.stage_out(s_out[1]), .fft_in(in_data), .sel_in(s_64),  .y(s_in[2]));
  bypass_mux u_mux3 (.stage_out(s_out[2]), .fft_in(in_data), .sel_in(s_16),  .y(s_in[3]));
  assign s_in[4] = s_out[3];

  for (genvar t = 1; t <= NSTAGES; t++) begin : g_stage
    fft_stage #(
      .NT      (stage_nt(t)),
      .HAS_MULT(t != NSTAGES)
    ) u_stage (
      .clk    (sclk[t-1]),
      .rst_n  (rst_n),
      .en     (adv),
      .ctrl   (ctrl[t-1]),
      .tw_addr(tw_addr[t-1]),
      .din    (s_in[t-1]),
      .dout   (s_out[t-1])
    );
  end

  assign out_data = s_out[NSTAGES-1];

endmodule
