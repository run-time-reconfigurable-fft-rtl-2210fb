// output_system: writes a finished frame from the cores to the four external
// memories over the vertical output buses.
//
// During a 64-cycle drain the core in row t mod 4 of every column pops one
// result from its loaded input-buffer set and drives it on the column's
// vertical bus; the output system registers the four words and writes them
// to the four external memories together with their frequency index. Core
// (r, q) holds, as word j = 4*j1 + j0, the result X(k) with
//   k = 64*j0 + 16*j1 + 4*q + r,
// the digit reversal of its position in the decimation-in-frequency flow
// graph, so the memories receive the spectrum in natural order by address.
// Using the vertical buses for output and four parallel memories follows the
// design; the address computation in place of a reordering pass is this
// implementation's choice.
//
// Timing: one cycle from the pop to out_valid/out_addr/out_data.
module output_system
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        drain_active,
  input  logic [5:0]  drain_t,
  input  cplx_t       core_out [NCORES],
  output logic [15:0] drain_pop,
  output logic [3:0]  out_valid,
  output logic [7:0]  out_addr [4],
  output cplx_t       out_data [4]
);
  logic [1:0] r;
  logic [3:0] slot;

  assign r    = drain_t[1:0];
  assign slot = drain_t[5:2];

  always_comb begin
    drain_pop = '0;
    for (int q = 0; q < 4; q++) drain_pop[{r, 2'(q)}] = drain_active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int q = 0; q < 4; q++) begin
        out_addr[q] <= '0;
        out_data[q] <= '0;
      end
    end else begin
      for (int q = 0; q < 4; q++) begin
        out_valid[q] <= drain_active;
        out_addr[q]  <= {slot[1:0], slot[3:2], 2'(q), r};
        out_data[q]  <= core_out[{r, 2'(q)}];
      end
    end
  end
endmodule
