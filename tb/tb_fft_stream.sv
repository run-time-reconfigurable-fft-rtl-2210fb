// tb_fft_stream: the engine as a continuous real-time FFT processor.
//
// Streams NFR frames of random samples without pause (the input offers four
// samples every cycle), then NFR more with random gaps in the stream, then a
// flush frame. Every frame's 256 results are compared bit-exactly with the
// reference FFT. At full input rate the engine must sustain one frame every
// 85 cycles (about 3 samples per cycle), the input must be throttled to 64
// transfers per 85-cycle period, and no frame may be lost or duplicated; with gaps the
// engine must simply wait for data.
module tb_fft_stream;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NFR     = 8;
  localparam int NFRAMES = 2 * NFR + 1;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid, in_ready;
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

  int xr [NFRAMES][256], xi [NFRAMES][256];
  int gr [NFRAMES][256], gi [NFRAMES][256];
  int out_frame = 0, out_cnt = 0;
  int done_cyc [$];
  int accept_cyc [$];

  initial
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < 256; n++) begin
        xr[f][n] = int'($urandom_range(131072)) - 65536;
        xi[f][n] = int'($urandom_range(131072)) - 65536;
      end

  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < 4; q++) if (out_valid[q]) begin
      if (out_frame < NFRAMES) begin
        gr[out_frame][out_addr[q]] = int'(out_data[q].re);
        gi[out_frame][out_addr[q]] = int'(out_data[q].im);
      end
      out_cnt++;
    end
    if (out_cnt == 256) begin out_cnt = 0; out_frame++; end
    if (frame_done) done_cyc.push_back(cycle);
    if (in_valid && in_ready) accept_cyc.push_back(cycle);
  end

  initial begin
    in_valid = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int t = 0; t < 64; t++) begin
        while (f >= NFR && $urandom_range(2) == 0) begin in_valid <= 1'b0; @(posedge clk); end
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

  initial begin
    int yr [256], yi [256];
    wait (out_frame == NFRAMES - 1);
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFRAMES - 1; f++) begin
      int bad;
      ref_fft256(xr[f], xi[f], yr, yi);
      bad = 0;
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (gr[f][k] != yr[k] || gi[f][k] != yi[k]) begin
          failures++;
          bad++;
        end
      end
      if (bad != 0) $display("FAIL frame %0d: %0d wrong results", f, bad);
    end
    // Sustained rate at full input rate: frames 1..NFR-1 finish 85 cycles apart.
    for (int f = 1; f < NFR; f++) begin
      checks++;
      if (done_cyc[f] - done_cyc[f-1] != 85) begin
        failures++;
        $display("FAIL frame %0d finished %0d cycles after the previous one", f, done_cyc[f] - done_cyc[f-1]);
      end
    end
    // Input throttled to 64 transfers per 85-cycle period at full rate
    // (periods whose loaded frame is still one of the gap-free ones).
    for (int f = 1; f <= NFR - 2; f++) begin
      int c;
      c = 0;
      foreach (accept_cyc[i]) if (accept_cyc[i] > done_cyc[f-1] && accept_cyc[i] <= done_cyc[f]) c++;
      checks++;
      if (c != 64) begin
        failures++;
        $display("FAIL %0d input transfers in full-rate period %0d", c, f);
      end
    end
    $display("stream: %0d frames checked, %0d completions", NFRAMES - 1, done_cyc.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
