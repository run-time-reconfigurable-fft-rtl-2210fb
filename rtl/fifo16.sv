// fifo16: 16-entry first-in first-out buffer of complex words ("16FIFO").
//
// Every FFT core has two of these input buffers (double buffering): one set
// is loaded from the input system and drained to the output system while the
// other set feeds the butterflies and receives the frame's results. The
// buffer is a circular register array with read and write pointers. The head
// word is visible on dout without a read cycle (first-word fall-through), and
// a push and a pop may happen in the same cycle even when the buffer is full,
// which lets a result leave and a new sample enter a full buffer together.
// The depth of 16 complex points follows the design; the fall-through read
// and simultaneous push/pop are this implementation's choices.
//
// The assertions sample rst_n synchronously (disable iff) while the flops
// use it asynchronously; lint tools may report rst_n as used both ways.
//
// Interface: push/din write at the tail, pop removes the head, count is the
// fill level (0..DEPTH). Pushing a full buffer without popping, or popping an
// empty one, is an error caught by assertions.
module fifo16
  import fft_pkg::*;
#(
  parameter int DEPTH = CPTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  cplx_t                    din,
  input  logic                     pop,
  output cplx_t                    dout,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  cplx_t         mem [DEPTH];
  logic [AW-1:0] rptr, wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wptr] <= din;
        wptr      <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      end
      if (pop) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign dout = mem[rptr];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push && !pop |-> count < (AW+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> count != '0);
endmodule
