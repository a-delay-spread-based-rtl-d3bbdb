// tb_commutator -- self-checking test of the radix-4 commutator.
//
// NT = 4. Drives a random stream (with advance gaps) and random multiplexer
// selects, and checks the four outputs against delayed copies of the input
// taken from a software history: O1 = x(k-3NT), O2 = x(k) or x(k-4NT),
// O3 = x(k-NT) or x(k-5NT), O4 = x(k-2NT) or x(k-6NT) for select 0 or 1,
// k being the index of the sample on din.
module tb_commutator;
  import fft_pkg::*;

  localparam int NT = 4;

  logic       clk = 1'b0, rst_n, en;
  cplx_t      din;
  logic [2:0] sel;
  cplx_t      o [4];

  commutator #(.NT(NT)) dut (.clk, .rst_n, .en, .din, .sel, .o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cplx_t hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t past(input int d);   // d samples before din
    int k = hist.size();
    return (d == 0) ? din : hist[k-d];
  endfunction

  task automatic chk(input int i, input int d);
    checks++;
    if (o[i] !== past(d)) begin
      failures++;
      if (failures < 10) $display("FAIL O%0d at %0d: got %h exp delay %0d = %h", i+1, hist.size(), o[i], d, past(d));
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0; sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      en  = ($urandom_range(0, 4) != 0);
      din = cplx_t'($urandom);
      sel = 3'($urandom);
      #1;
      if (hist.size() >= 6*NT) begin
        chk(0, 3*NT);
        chk(1, sel[0] ? 4*NT : 0);
        chk(2, sel[1] ? 5*NT : NT);
        chk(3, sel[2] ? 6*NT : 2*NT);
      end
      @(negedge clk);
      if (en) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
