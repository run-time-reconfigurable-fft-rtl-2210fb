// local_buffer: the core's local 16-point result buffer ("local 16FIFO").
//
// At the end of each stage the four butterflies of a core deliver 16 results
// at once; they are captured here in parallel (entry 4*b + i holds output i of
// butterfly b). During the next 16 cycles the LCCU reads one entry per cycle,
// in the order the following data exchange or write-back needs, by giving a
// read address. The buffer's size follows the design; the parallel write and
// the addressed read (rather than strict first-in first-out order) are this
// implementation's choice so that one buffer serves every exchange pattern.
//
// Interface: we captures din[0..15]; dout = entry raddr, combinational.
module local_buffer
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  cplx_t      din [CPTS],
  input  logic [3:0] raddr,
  output cplx_t      dout
);
  cplx_t mem [CPTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CPTS; i++) mem[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < CPTS; i++) mem[i] <= din[i];
    end
  end

  assign dout = mem[raddr];
endmodule
