// fft_pkg: types and constants shared by the 256-point radix-4 FFT engine.
//
// Samples are complex numbers whose real and imaginary parts are 18-bit
// two's complement words with 1 sign bit, 1 integer bit and 16 fraction bits
// (range -2 .. +2, signals normalised to +-1), as the design specifies for all
// data pathways. Twiddle factors are 8-bit two's complement words; this
// implementation places 6 fraction bits in them so that 1.0 (= 64) is
// exactly representable, which is its own choice.
//
// The package also holds the control word that the global controller (GCCU)
// broadcasts to all 16 cores every cycle and the twiddle table function used
// by the coefficient ROMs and by the testbenches' reference models.
package fft_pkg;

  localparam int DW      = 18;   // data word width (re and im)
  localparam int TW      = 8;    // twiddle word width
  localparam int TW_FRAC = 6;    // fraction bits of a twiddle word
  localparam int NPTS    = 256;  // transform length
  localparam int NCORES  = 16;   // FFT cores (4 x 4 grid)
  localparam int CPTS    = 16;   // complex points held by one core
  localparam int NSTAGES = 4;    // radix-4 stages of a 256-point FFT

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [TW-1:0] tw_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } twid_t;

  // Compute-engine phase broadcast by the GCCU.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // cores idle
    PH_OPS  = 2'd1,   // operand loading, one word per cycle (j = 0..15)
    PH_COMP = 2'd2,   // butterflies evaluated, results into the local buffer
    PH_WB   = 2'd3    // final results written back into the input buffer
  } phase_e;

  typedef struct packed {
    phase_e     phase;
    logic [1:0] stage;      // 0..3
    logic [3:0] j;          // cycle within PH_OPS / PH_WB
    logic       comp_bank;  // input-buffer set being computed; the other loads
  } ctrl_t;

  // MUX3: source of the word written into a butterfly operand register.
  typedef enum logic [1:0] {
    SRC_BANK0 = 2'd0,  // head of input buffer set 0
    SRC_BANK1 = 2'd1,  // head of input buffer set 1
    SRC_XCHG  = 2'd2,  // MUX2: a lane of the horizontal or vertical bus
    SRC_LOCAL = 2'd3   // the core's own local buffer
  } opsrc_e;

  // DMUX: destination of the word read from the local buffer.
  typedef enum logic [1:0] {
    DM_NONE = 2'd0,
    DM_HB   = 2'd1,    // horizontal bus lane of this core
    DM_VB   = 2'd2,    // vertical bus lane of this core
    DM_WB   = 2'd3     // write-back into the input buffer being computed
  } dmux_e;

  // Twiddle W_256^k = exp(-j*2*pi*k/256), rounded to TW_FRAC fraction bits.
  typedef logic [2*TW-1:0] twtab_t [NPTS];   // entries are packed twid_t

  function automatic twtab_t twiddle_table();
    twtab_t t;
    real    ang;
    tw_t    wr, wi;
    for (int k = 0; k < NPTS; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(NPTS);
      wr   = TW'($rtoi($floor(real'(1 << TW_FRAC) * $cos(ang) + 0.5)));
      wi   = TW'($rtoi($floor(-real'(1 << TW_FRAC) * $sin(ang) + 0.5)));
      t[k] = {wr, wi};
    end
    return t;
  endfunction

endpackage
