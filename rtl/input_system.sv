// input_system: loads one 256-point frame from the four external memories
// into the cores' input buffers.
//
// Each cycle it accepts four samples x(4t+q), q = 0..3, one from each
// external memory, and places x(4t+q) on input bus IB[q], which is shared by
// the four cores of grid column q. Only the core in row t mod 4 of that
// column pushes it. The index n = 4t + q = 64*n3 + 16*n2 + 4*n1 + n0 thus
// goes to core (row n1, column n0) as its word number 4*n3 + n2, which is
// the digit-reversed grouping the first FFT stage needs, without any
// reordering memory. After 64 accepted cycles the frame is complete
// (load_full) and no more samples are accepted until the GCCU switches the
// buffer sets (load_clear). The four parallel input buses and the reordering
// during loading follow the design; the valid/ready handshake and the
// assignment of samples to memories (n mod 4) are this implementation's
// choices.
//
// Timing: a sample is accepted in a cycle with in_valid && in_ready and is
// written into the core's buffer at the end of that cycle.
module input_system
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data [4],
  input  logic        load_clear,
  output logic        load_full,
  output cplx_t       ib_data [4],
  output logic [15:0] ld_push       // per core, index 4*row + column
);
  logic [5:0] t;
  logic       accept;

  assign in_ready = !load_full;
  assign accept   = in_valid && in_ready;
  assign ib_data  = in_data;

  always_comb begin
    ld_push = '0;
    for (int q = 0; q < 4; q++) ld_push[{t[1:0], 2'(q)}] = accept;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      load_full <= 1'b0;
    end else begin
      if (accept) begin
        t <= t + 1'b1;
        if (t == 6'd63) load_full <= 1'b1;
      end
      if (load_clear) load_full <= 1'b0;
    end
  end
endmodule
