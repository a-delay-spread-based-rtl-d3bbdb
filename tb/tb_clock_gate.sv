// tb_clock_gate -- self-checking test of the latch-based clock gate.
//
// Toggles the enable at random points of both clock phases and samples the
// gated clock in the middle of every phase: while clk is high, gclk must
// equal the enable as it was when clk last rose; while clk is low, gclk must
// be low. A change of the enable while clk is high must not reach gclk.
module tb_clock_gate;

  logic clk = 1'b0, en = 1'b0, gclk;

  clock_gate dut (.clk, .en, .gclk);

  int checks = 0, failures = 0;
  int rises = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) rises++;

  initial begin
    logic en_at_rise;
    for (int i = 0; i < 300; i++) begin
      // low phase: change enable at a random time
      #2 en = 1'($urandom);
      #3 checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL: gclk high while clk low"); end
      #5 clk = 1'b1;
      en_at_rise = en;
      #2 en = 1'($urandom);          // glitch attempt while clk high
      #3 checks++;
      if (gclk !== en_at_rise) begin failures++; $display("FAIL: gclk %b, enable at rise %b", gclk, en_at_rise); end
      #5 clk = 1'b0;
    end
    checks++;
    if (rises == 0 || rises == 300) begin failures++; $display("FAIL: gating never observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
