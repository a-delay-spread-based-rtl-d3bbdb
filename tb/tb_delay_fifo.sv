// tb_delay_fifo -- self-checking test of the N_t FIFO (delay line).
//
// Three FIFOs (DEPTH 1, 2 and 7) get the same random stream with random
// advance gaps. A software history of all accepted words gives the expected
// output: after at least DEPTH advances, dout must equal the word accepted
// DEPTH advances before the word now at din. Also checks that dout holds
// while en is low.
module tb_delay_fifo;
  import fft_pkg::*;

  logic  clk = 1'b0, rst_n, en;
  cplx_t din;
  cplx_t dout1, dout2, dout7;

  delay_fifo #(.DEPTH(1)) u1 (.clk, .rst_n, .en, .din, .dout(dout1));
  delay_fifo #(.DEPTH(2)) u2 (.clk, .rst_n, .en, .din, .dout(dout2));
  delay_fifo #(.DEPTH(7)) u7 (.clk, .rst_n, .en, .din, .dout(dout7));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input cplx_t got, input int d);
    int k = hist.size();   // index of the word now at din
    if (k >= d) begin
      checks++;
      if (got !== hist[k-d]) begin
        failures++;
        if (failures < 10) $display("FAIL depth %0d at %0d: got %h exp %h", d, k, got, hist[k-d]);
      end
    end
  endtask

  initial begin
    cplx_t prev7;
    rst_n = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = cplx_t'($urandom);
      // outputs refer to the history before this word
      chk(dout1, 1);
      chk(dout2, 2);
      chk(dout7, 7);
      prev7 = dout7;
      @(negedge clk);
      if (en) hist.push_back(din);
      else begin
        checks++;
        if (dout7 !== prev7) begin failures++; $display("FAIL: moved without en"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
