// tb_bypass_mux -- self-checking test of an entry multiplexer (MUX I/II/III).
//
// Random stage outputs, processor inputs and selects: the output must be
// the processor input when the select is 1, the stage output otherwise.
module tb_bypass_mux;
  import fft_pkg::*;

  cplx_t stage_out, fft_in, y;
  logic  sel_in;

  bypass_mux dut (.stage_out, .fft_in, .sel_in, .y);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      stage_out = cplx_t'($urandom);
      fft_in    = cplx_t'($urandom);
      sel_in    = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel_in ? fft_in : stage_out)) begin
        failures++;
        $display("FAIL sel=%b y=%h", sel_in, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
