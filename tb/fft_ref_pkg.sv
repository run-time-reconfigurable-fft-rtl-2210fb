// fft_ref_pkg: reference arithmetic for the FFT engine's testbenches.
//
// Worked out from the number formats alone, independently of the RTL:
// twiddles W_256^k = exp(-j*2*pi*k/256) rounded to 6 fraction bits, and a
// radix-4 DIF butterfly on integers (sum, arithmetic shift right by 2,
// complex product with a rounded twiddle, arithmetic shift right by 6,
// wrap to 18 bits), and a complete 256-point FFT built from that butterfly.
package fft_ref_pkg;

  function automatic int ref_twr(input int k);
    real a;
    a = 2.0 * 3.14159265358979323846 * (k % 256) / 256.0;
    return $rtoi($floor(64.0 * $cos(a) + 0.5));
  endfunction

  function automatic int ref_twi(input int k);
    real a;
    a = 2.0 * 3.14159265358979323846 * (k % 256) / 256.0;
    return $rtoi($floor(-64.0 * $sin(a) + 0.5));
  endfunction

  function automatic int wrap18(input longint v);
    logic signed [17:0] t;
    t = 18'(v);
    return int'(t);
  endfunction

  // Butterfly on operands (ar[i], ai[i]), i = 0..3, with twiddle exponent p;
  // results in yr/yi.
  task automatic ref_bfly(input int ar [4], input int ai [4], input int p,
                          output int yr [4], output int yi [4]);
    longint sr [4], si [4];
    sr[0] = longint'(ar[0]) + ar[1] + ar[2] + ar[3];
    si[0] = longint'(ai[0]) + ai[1] + ai[2] + ai[3];
    sr[1] = longint'(ar[0]) + ai[1] - ar[2] - ai[3];
    si[1] = longint'(ai[0]) - ar[1] - ai[2] + ar[3];
    sr[2] = longint'(ar[0]) - ar[1] + ar[2] - ar[3];
    si[2] = longint'(ai[0]) - ai[1] + ai[2] - ai[3];
    sr[3] = longint'(ar[0]) - ai[1] - ar[2] + ai[3];
    si[3] = longint'(ai[0]) + ar[1] - ai[2] - ar[3];
    for (int i = 0; i < 4; i++) begin
      longint vr, vi, wr, wi;
      vr = sr[i] >>> 2;
      vi = si[i] >>> 2;
      if (i == 0) begin
        yr[i] = wrap18(vr);
        yi[i] = wrap18(vi);
      end else begin
        wr = ref_twr(i * p);
        wi = ref_twi(i * p);
        yr[i] = wrap18((vr * wr - vi * wi) >>> 6);
        yi[i] = wrap18((vr * wi + vi * wr) >>> 6);
      end
    end
  endtask

  // Complete 256-point radix-4 DIF FFT with the same arithmetic, in place,
  // followed by base-4 digit reversal: yr/yi are in natural order.
  task automatic ref_fft256(input int xr [256], input int xi [256],
                            output int yr [256], output int yi [256]);
    int ar [256], ai [256];
    ar = xr;
    ai = xi;
    for (int s = 0; s < 4; s++) begin
      int L, Q;
      L = 256 >> (2 * s);
      Q = L / 4;
      for (int base = 0; base < 256; base += L)
        for (int p = 0; p < Q; p++) begin
          int br [4], bi [4], orr [4], oi [4];
          for (int i = 0; i < 4; i++) begin br[i] = ar[base+p+i*Q]; bi[i] = ai[base+p+i*Q]; end
          ref_bfly(br, bi, p * (256 / L), orr, oi);
          for (int i = 0; i < 4; i++) begin ar[base+p+i*Q] = orr[i]; ai[base+p+i*Q] = oi[i]; end
        end
    end
    for (int k = 0; k < 256; k++) begin
      int pos;
      pos   = 64 * (k % 4) + 16 * ((k / 4) % 4) + 4 * ((k / 16) % 4) + k / 64;
      yr[k] = ar[pos];
      yi[k] = ai[pos];
    end
  endtask

endpackage
