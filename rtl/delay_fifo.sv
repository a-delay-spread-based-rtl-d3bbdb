// delay_fifo -- fixed-length FIFO of DEPTH complex words (one "N_t" box of
// the commutator).
//
// Every enabled clock (en = 1) writes din and moves the queue by one place,
// so dout always shows the word written DEPTH advances before the word now
// at din. As in the commutator of the architecture, the FIFO is a dual-port
// RAM: DEPTH-1 words of RAM addressed by one circular pointer (read the
// oldest word, write the new one at the same address) plus the registered
// read port, which is the last of the DEPTH places. DEPTH = 1 is a single
// register. The RAM contents are not reset; only the pointer and the output
// register are. Timing: dout changes on the clock edge after an advance.
module delay_fifo
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t din,
  output cplx_t dout
);

  localparam int unsigned RAM_D = (DEPTH > 1) ? DEPTH - 1 : 1;
  localparam int unsigned PTR_W = (RAM_D > 1) ? $clog2(RAM_D) : 1;

  if (DEPTH == 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  dout <= '0;
      else if (en) dout <= din;
  end else begin : g_ram
    cplx_t             mem [RAM_D];
    logic [PTR_W-1:0]  ptr;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ptr  <= '0;
        dout <= '0;
      end else if (en) begin
        dout <= mem[ptr];
        ptr  <= (ptr == PTR_W'(RAM_D - 1)) ? '0 : ptr + 1'b1;
      end

    always_ff @(posedge clk)
      if (en) mem[ptr] <= din;
  end

endmodule
