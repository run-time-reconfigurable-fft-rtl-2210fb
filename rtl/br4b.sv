// br4b: basic radix-4 decimation-in-frequency butterfly element.
//
// Four complex operands a, b, c, d (x(n), x(n+N/4), x(n+N/2), x(n+3N/4)) sit
// in eight 18-bit operand registers (real and imaginary part each), written
// one complex word per cycle under control of the core's LCCU. From them the
// adder/subtractors form
//   s0 = a + b + c + d          s1 = a - jb - c + jd
//   s2 = a - b + c - d          s3 = a + jb - c - jd
// each scaled by 1/4 (arithmetic right shift by 2, back to 18 bits). s0 is
// output directly; s1, s2 and s3 are multiplied by the twiddles W^p, W^2p,
// W^3p read from three coefficient ROMs, and the 26-bit products are
// truncated (6 fraction bits dropped) back to 18 bits. This datapath, the
// widths and the scaling follow the design; the register write port and the
// twiddle addressing by a base exponent p (tw_base) are this implementation's
// choices.
//
// Interface: op_we/op_idx/op_data write operand register pair op_idx;
// tw_base is the exponent p (mod 256); y[0..3] are the results.
// Timing: y is combinational from the operand registers and tw_base, so a
// result can be captured the cycle after the last operand is written.
module br4b
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       op_we,
  input  logic [1:0] op_idx,
  input  cplx_t      op_data,
  input  logic [7:0] tw_base,
  output cplx_t      y [4]
);
  localparam int SW = DW + 2;   // width of the unscaled butterfly sums
  localparam int PW = DW + TW;  // 26-bit product width

  cplx_t opr [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) opr[i] <= '0;
    end else if (op_we) begin
      opr[op_idx] <= op_data;
    end
  end

  // Adders/subtractors and scaling.
  logic signed [SW-1:0] ar, ai, br, bi, cr, ci, dr, di;
  logic signed [SW-1:0] sr [4];
  logic signed [SW-1:0] si [4];
  cplx_t scaled [4];

  always_comb begin
    ar = SW'(opr[0].re); ai = SW'(opr[0].im);
    br = SW'(opr[1].re); bi = SW'(opr[1].im);
    cr = SW'(opr[2].re); ci = SW'(opr[2].im);
    dr = SW'(opr[3].re); di = SW'(opr[3].im);
    sr[0] = ar + br + cr + dr;  si[0] = ai + bi + ci + di;
    sr[1] = ar + bi - cr - di;  si[1] = ai - br - ci + dr;
    sr[2] = ar - br + cr - dr;  si[2] = ai - bi + ci - di;
    sr[3] = ar - bi - cr + di;  si[3] = ai + br - ci - dr;
    for (int i = 0; i < 4; i++) begin
      scaled[i].re = DW'(sr[i] >>> 2);
      scaled[i].im = DW'(si[i] >>> 2);
    end
  end

  // Twiddle ROMs and complex multipliers for outputs 1..3.
  logic [7:0] tw_addr [1:3];
  twid_t      w       [1:3];
  logic signed [PW-1:0] pr [1:3];
  logic signed [PW-1:0] pi [1:3];

  assign y[0] = scaled[0];

  for (genvar g = 1; g < 4; g++) begin : g_mul
    assign tw_addr[g] = 8'(g * tw_base);
    twiddle_rom u_rom (.addr(tw_addr[g]), .w(w[g]));
    cmplx_mult u_cm (
      .xr(scaled[g].re), .xi(scaled[g].im),
      .wr(w[g].re),      .wi(w[g].im),
      .pr(pr[g]),        .pi(pi[g])
    );
    // Truncation: drop the twiddle's fraction bits, keep 18 bits.
    assign y[g].re = DW'(pr[g] >>> TW_FRAC);
    assign y[g].im = DW'(pi[g] >>> TW_FRAC);
  end
endmodule
