// tb_stage_fsm -- self-checking test of the per-stage control FSM.
//
// NT = 4. After a restart with a random start value the TB keeps its own
// count c (mod 16) of advances and checks, on every cycle, C1..C3 (the
// thermometer code of q = (c/4 + 1) mod 4), C4..C7 (one-hot q) and the
// twiddle exponent q * (c mod 4). Restarts are repeated with new values.
module tb_stage_fsm;
  import fft_pkg::*;

  localparam int NT = 4;

  logic             clk = 1'b0, rst_n, restart, en;
  logic [TWA_W-1:0] init;
  stage_ctrl_t      ctrl;
  logic [TWA_W-1:0] tw_addr;

  stage_fsm #(.NT(NT)) dut (.clk, .rst_n, .restart, .init, .en, .ctrl, .tw_addr);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    rst_n = 1'b0; restart = 1'b0; en = 1'b0; init = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      restart = 1'b1;
      init    = TWA_W'($urandom);
      c       = int'(init) % (4*NT);
      @(negedge clk);
      restart = 1'b0;
      for (int i = 0; i < 60; i++) begin
        int q, n;
        en = ($urandom_range(0, 3) != 0);
        q  = (c / NT + 1) % 4;
        n  = c % NT;
        checks++;
        if (ctrl.sel != {q == 3, q >= 2, q >= 1} || ctrl.q_onehot != 4'(1 << q) ||
            int'(tw_addr) != q * n) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d: sel=%b oh=%b tw=%0d", c, ctrl.sel, ctrl.q_onehot, tw_addr);
        end
        @(negedge clk);
        if (en) c = (c + 1) % (4*NT);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
