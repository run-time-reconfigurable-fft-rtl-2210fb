// tb_fft_engine: end-to-end test of the 256-point FFT engine at its default
// (and only) size.
//
// Streams NF random frames (real and imaginary parts uniform in [-1, +1]),
// one tone frame and one trailing frame that flushes the last result out.
// Each frame's 256 results, collected by address from the four output ports,
// are compared word for word with an independent reference: a plain in-place
// radix-4 decimation-in-frequency FFT on integers with the same rules
// (scale each butterfly by 1/4 with an arithmetic shift, multiply by
// twiddles rounded to 6 fraction bits, drop 6 bits) followed by digit
// reversal. The results are also compared with a floating-point DFT/256
// within a tolerance, and the tone frame must put its energy in one bin.
//
// Mechanisms that must each happen at least once: a buffer-set swap, an
// input stall (a frame loaded before the computation ends), output draining
// overlapped with computation, a column (vertical bus) exchange, a row
// (horizontal bus) exchange, a simultaneous pop and push of a full input
// buffer, and a gap in the input stream. The frame period at full input
// rate is checked to be 85 cycles.
module tb_fft_engine;
  import fft_pkg::*;

  localparam int NF      = 4;          // random frames
  localparam int NFRAMES = NF + 2;     // + tone frame + flush frame
  localparam int TONE    = 37;         // frequency bin of the tone frame
  localparam int TOL     = 400;        // float tolerance, LSBs of 2^-16

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid;
  logic       in_ready;
  cplx_t      in_data [4];
  logic [3:0] out_valid;
  logic [7:0] out_addr [4];
  cplx_t      out_data [4];
  logic       frame_done, busy;

  always #5 clk = ~clk;

  fft_engine dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Stimulus storage and reference.
  int xr [NFRAMES][256];
  int xi [NFRAMES][256];
  int got_r [NFRAMES][256];
  int got_i [NFRAMES][256];
  int got_n [NFRAMES];

  int twr [256], twi [256];

  function automatic int wrap18(input longint v);
    logic signed [17:0] t;
    t = 18'(v);
    return int'(t);
  endfunction

  initial begin
    for (int k = 0; k < 256; k++) begin
      real a;
      a      = 2.0 * 3.14159265358979323846 * k / 256.0;
      twr[k] = $rtoi($floor(64.0 * $cos(a) + 0.5));
      twi[k] = $rtoi($floor(-64.0 * $sin(a) + 0.5));
    end
  end

  // Reference fixed-point FFT, natural-order output.
  task automatic ref_fft(input int f, output int yr [256], output int yi [256]);
    int ar [256], ai [256];
    for (int n = 0; n < 256; n++) begin ar[n] = xr[f][n]; ai[n] = xi[f][n]; end
    for (int s = 0; s < 4; s++) begin
      int L, Q;
      L = 256 >> (2 * s);
      Q = L / 4;
      for (int base = 0; base < 256; base += L)
        for (int p = 0; p < Q; p++) begin
          longint a_r, a_i, b_r, b_i, c_r, c_i, d_r, d_i;
          longint sr [4], si [4];
          a_r = ar[base+p];     a_i = ai[base+p];
          b_r = ar[base+p+Q];   b_i = ai[base+p+Q];
          c_r = ar[base+p+2*Q]; c_i = ai[base+p+2*Q];
          d_r = ar[base+p+3*Q]; d_i = ai[base+p+3*Q];
          sr[0] = a_r + b_r + c_r + d_r;  si[0] = a_i + b_i + c_i + d_i;
          sr[1] = a_r + b_i - c_r - d_i;  si[1] = a_i - b_r - c_i + d_r;
          sr[2] = a_r - b_r + c_r - d_r;  si[2] = a_i - b_i + c_i - d_i;
          sr[3] = a_r - b_i - c_r + d_i;  si[3] = a_i + b_r - c_i - d_r;
          for (int i = 0; i < 4; i++) begin
            longint vr, vi, wr, wi;
            int e;
            vr = sr[i] >>> 2;
            vi = si[i] >>> 2;
            if (i == 0) begin
              ar[base+p] = wrap18(vr); ai[base+p] = wrap18(vi);
            end else begin
              e  = (i * p * (256 / L)) % 256;
              wr = twr[e]; wi = twi[e];
              ar[base+p+i*Q] = wrap18((vr * wr - vi * wi) >>> 6);
              ai[base+p+i*Q] = wrap18((vr * wi + vi * wr) >>> 6);
            end
          end
        end
    end
    for (int k = 0; k < 256; k++) begin
      int pos;
      pos   = ((k & 3) << 6) | (((k >> 2) & 3) << 4) | (((k >> 4) & 3) << 2) | ((k >> 6) & 3);
      yr[k] = ar[pos];
      yi[k] = ai[pos];
    end
  endtask

  // Stimulus generation.
  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      got_n[f] = 0;
      for (int n = 0; n < 256; n++) begin
        if (f == NF) begin   // tone: 0.75 * exp(+j*2*pi*TONE*n/256)
          real a;
          a = 2.0 * 3.14159265358979323846 * TONE * n / 256.0;
          xr[f][n] = $rtoi(0.75 * 65536.0 * $cos(a));
          xi[f][n] = $rtoi(0.75 * 65536.0 * $sin(a));
        end else begin
          xr[f][n] = int'($urandom_range(131072)) - 65536;
          xi[f][n] = int'($urandom_range(131072)) - 65536;
        end
      end
    end
  end

  // Mechanism counters.
  int n_swap = 0, n_stall = 0, n_overlap = 0, n_vb = 0, n_hb = 0, n_pushpop = 0, n_gap = 0;
  int last_done = -1, n_period = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_gccu.swap) n_swap++;
    if (in_valid && !in_ready) n_stall++;
    if (out_valid != 0 && busy) n_overlap++;
    if (dut.ctrl.phase == PH_OPS && dut.ctrl.stage == 2'd1) n_vb++;
    if (dut.ctrl.phase == PH_OPS && dut.ctrl.stage == 2'd2) n_hb++;
    if (dut.g_row[0].g_col[0].u_core.g_set[0].u_fifo.push &&
        dut.g_row[0].g_col[0].u_core.g_set[0].u_fifo.pop &&
        dut.g_row[0].g_col[0].u_core.g_set[0].u_fifo.count == 5'd16) n_pushpop++;
    if (frame_done) begin
      // Frames 1..NF-1 are streamed at full rate, so their computations start
      // back to back once the pipeline is full.
      if (last_done >= 0 && n_swap >= 3 && n_swap <= NF) begin
        checks++;
        n_period++;
        if (cycle - last_done != 85) begin
          failures++;
          $display("FAIL frame period %0d, expected 85", cycle - last_done);
        end
      end
      last_done = cycle;
    end
  end

  // Output collection.
  int out_frame = 0;
  int out_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < 4; q++) if (out_valid[q]) begin
      int k;
      k = int'(out_addr[q]);
      if (out_frame < NFRAMES) begin
        got_r[out_frame][k] = int'(out_data[q].re);
        got_i[out_frame][k] = int'(out_data[q].im);
        got_n[out_frame]++;
      end
      out_cnt++;
    end
    if (out_cnt == 256) begin
      out_cnt = 0;
      out_frame++;
    end
  end

  // Driver: frame 0 with gaps in the stream, then full rate.
  initial begin
    in_valid = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int t = 0; t < 64; t++) begin
        if (f == 0 && (t % 7) == 3) begin
          in_valid <= 1'b0;
          n_gap++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int q = 0; q < 4; q++) begin
          in_data[q].re <= 18'(xr[f][4*t+q]);
          in_data[q].im <= 18'(xi[f][4*t+q]);
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // Checking.
  initial begin
    int yr [256], yi [256];
    wait (out_frame == NFRAMES - 1);
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFRAMES - 1; f++) begin
      int bad, maxerr;
      checks++;
      if (got_n[f] != 256) begin
        failures++;
        $display("FAIL frame %0d: %0d results", f, got_n[f]);
      end
      ref_fft(f, yr, yi);
      bad = 0;
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (got_r[f][k] != yr[k] || got_i[f][k] != yi[k]) begin
          failures++;
          if (bad < 5)
            $display("FAIL frame %0d X(%0d) = (%0d,%0d), expected (%0d,%0d)",
                     f, k, got_r[f][k], got_i[f][k], yr[k], yi[k]);
          bad++;
        end
      end
      // Floating-point DFT / 256.
      maxerr = 0;
      for (int k = 0; k < 256; k++) begin
        real sr, si, a;
        int er, ei;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < 256; n++) begin
          a  = -2.0 * 3.14159265358979323846 * ((n * k) % 256) / 256.0;
          sr = sr + xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          si = si + xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
        er = $rtoi(sr / 256.0) - got_r[f][k];
        ei = $rtoi(si / 256.0) - got_i[f][k];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
      end
      checks++;
      if (maxerr > TOL) begin
        failures++;
        $display("FAIL frame %0d: max error against the DFT %0d LSB", f, maxerr);
      end
      $display("frame %0d: %0d mismatches, max |error| vs DFT = %0d LSB", f, bad, maxerr);
    end
    // Tone frame: bin TONE near 0.75, every other bin small.
    checks++;
    begin
      int pk;
      pk = 0;
      for (int k = 0; k < 256; k++) begin
        int m;
        m = (got_r[NF][k] < 0 ? -got_r[NF][k] : got_r[NF][k]) +
            (got_i[NF][k] < 0 ? -got_i[NF][k] : got_i[NF][k]);
        if (m > (got_r[NF][pk] < 0 ? -got_r[NF][pk] : got_r[NF][pk]) +
                (got_i[NF][pk] < 0 ? -got_i[NF][pk] : got_i[NF][pk])) pk = k;
      end
      if (pk != TONE || got_r[NF][TONE] < 45000) begin
        failures++;
        $display("FAIL tone peak at bin %0d, value %0d", pk, got_r[NF][pk]);
      end
    end
    // Mechanisms.
    $display("swaps=%0d stalls=%0d overlap=%0d vb=%0d hb=%0d pushpop=%0d gaps=%0d periods=%0d",
             n_swap, n_stall, n_overlap, n_vb, n_hb, n_pushpop, n_gap, n_period);
    checks += 8;
    if (n_swap == 0)    begin failures++; $display("FAIL no swap"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no input stall"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no output/compute overlap"); end
    if (n_vb == 0)      begin failures++; $display("FAIL no vertical exchange"); end
    if (n_hb == 0)      begin failures++; $display("FAIL no horizontal exchange"); end
    if (n_pushpop == 0) begin failures++; $display("FAIL no push+pop on a full buffer"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no input gap"); end
    if (n_period == 0)  begin failures++; $display("FAIL no frame period measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
