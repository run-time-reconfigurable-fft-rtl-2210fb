// cmplx_mult: complex multiplier built from three real Booth multipliers.
//
// Computes (xr + j*xi) * (wr + j*wi) with the three-multiplier form
//   k1 = wr*(xr + xi),  k2 = xi*(wr + wi),  k3 = xr*(wi - wr)
//   re = k1 - k2 = xr*wr - xi*wi,   im = k1 + k3 = xr*wi + xi*wr
// so one real multiplier is traded for extra additions, as the design
// describes. Which operands are pre-added is this implementation's choice.
//
// Interface: x is an 18-bit data word pair, w an 8-bit twiddle pair; the
// result is the full 26-bit (DW+TW) product of each part, before truncation.
// Combinational, no latency. The exact result fits 26 bits except for the
// single corner |x| = 2^17, |w| = 2^7 on both parts, which cannot occur for
// the scaled, rounded twiddles used in the engine.
module cmplx_mult
  import fft_pkg::*;
#(
  parameter int WD = DW,
  parameter int WT = TW
) (
  input  logic signed [WD-1:0]    xr,
  input  logic signed [WD-1:0]    xi,
  input  logic signed [WT-1:0]    wr,
  input  logic signed [WT-1:0]    wi,
  output logic signed [WD+WT-1:0] pr,
  output logic signed [WD+WT-1:0] pi
);
  logic signed [WD:0]      xsum;
  logic signed [WT:0]      wsum, wdif;
  logic signed [WD+WT:0]   k1, k2, k3;

  assign xsum = (WD+1)'(xr) + (WD+1)'(xi);
  assign wsum = (WT+1)'(wr) + (WT+1)'(wi);
  assign wdif = (WT+1)'(wi) - (WT+1)'(wr);

  booth_mult #(.WA(WD+1), .WB(WT))   u_k1 (.a(xsum), .b(wr),   .p(k1));
  booth_mult #(.WA(WD),   .WB(WT+1)) u_k2 (.a(xi),   .b(wsum), .p(k2));
  booth_mult #(.WA(WD),   .WB(WT+1)) u_k3 (.a(xr),   .b(wdif), .p(k3));

  // Sums taken modulo 2^(WD+WT): the result bits are those of the exact sum.
  assign pr = (WD+WT)'(k1) - (WD+WT)'(k2);
  assign pi = (WD+WT)'(k1) + (WD+WT)'(k3);
endmodule
