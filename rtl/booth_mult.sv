// booth_mult: parallel radix-4 (modified) Booth multiplier for signed operands.
//
// The multiplier operand b is recoded into ceil(WB/2) Booth digits in
// {-2,-1,0,+1,+2}; each digit selects 0, +-a or +-2a as a partial product,
// shifted by two bit positions per digit, and all partial products are
// summed in one combinational array. Using the Booth technique instead of the
// FPGA's embedded multipliers follows the design; radix-4 recoding and the
// plain adder array are this implementation's choice.
//
// Interface: a (WA bits, signed), b (WB bits, signed), p = a*b (WA+WB bits,
// signed, exact). Purely combinational, no latency.
module booth_mult #(
  parameter int WA = 18,
  parameter int WB = 8
) (
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic signed [WA+WB-1:0] p
);
  localparam int NDIG = (WB + 1) / 2;   // Booth digits
  localparam int WBX  = 2 * NDIG;       // b sign-extended to an even width
  localparam int WP   = WA + WB;

  logic [WBX:0] bx;                      // {sign-extended b, 0}
  logic signed [WP-1:0] pp [NDIG];
  logic signed [WP-1:0] acc;

  assign bx = {{(WBX-WB){b[WB-1]}}, b, 1'b0};

  always_comb begin
    logic signed [WP-1:0] ax;
    ax = WP'(a);
    for (int i = 0; i < NDIG; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp[i] = ax;
        3'b011:         pp[i] = ax <<< 1;
        3'b100:         pp[i] = -(ax <<< 1);
        3'b101, 3'b110: pp[i] = -ax;
        default:        pp[i] = '0;
      endcase
    end
    acc = '0;
    for (int i = 0; i < NDIG; i++) acc = acc + (pp[i] <<< (2 * i));
  end

  assign p = acc;
endmodule
