// twiddle_rom: coefficient ROM holding the twiddle factors W_256^k.
//
// Entry k holds round(64*cos(2*pi*k/256)) and round(-64*sin(2*pi*k/256)) as
// 8-bit two's complement words (6 fraction bits). The contents are computed
// at elaboration from that formula, so the ROM is a constant table in
// hardware. Each butterfly owns its ROMs so that all butterflies read their
// twiddles in parallel, as the design prescribes; addressing by the full
// exponent k (rather than a per-butterfly subset) is this implementation's
// choice.
//
// Interface: addr (8 bits) -> w, combinational read.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [$clog2(NPTS)-1:0] addr,
  output twid_t                w
);
  localparam twtab_t TABLE = twiddle_table();

  assign w = twid_t'(TABLE[addr]);
endmodule
