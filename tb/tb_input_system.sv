// tb_input_system: streams frames with random gaps into the input system
// and records, per core, the order of the samples it is told to push. Sample
// x(n), n = 64*n3 + 16*n2 + 4*n1 + n0, must reach core (row n1, column n0)
// as its push number 4*n3 + n2, on the input bus of column n0. After 64
// accepted cycles the frame must be marked complete and no sample accepted
// until the frame is released.
module tb_input_system;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_ready, load_clear, load_full;
  cplx_t       in_data [4], ib_data [4];
  logic [15:0] ld_push;

  always #5 clk = ~clk;

  input_system dut (.*);

  int pushes [16];
  int n_idx = 0;        // sample index offered in the current frame

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL %s", m);
  endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (in_ready == load_full) fail("ready");
    for (int c = 0; c < 16; c++) if (ld_push[c]) begin
      int r, q, n;
      r = c / 4; q = c % 4;
      n = int'(ib_data[q].re);          // samples carry their index in .re
      checks++;
      if (!(in_valid && in_ready) || n % 4 != q || (n / 4) % 4 != r ||
          (n / 16) % 4 + 4 * (n / 64) != pushes[c] || ib_data[q].im != 18'(n + 1000))
        fail($sformatf("core %0d push %0d got sample %0d", c, pushes[c], n));
    end
    checks++;
    if ((in_valid && in_ready) != ($countones(ld_push) == 4)) fail("push count");
  end

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 16; c++) if (ld_push[c]) pushes[c]++;

  initial begin
    in_valid = 1'b0; load_clear = 1'b0;
    for (int q = 0; q < 4; q++) in_data[q] = '0;
    for (int c = 0; c < 16; c++) pushes[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int t = 0; t < 64; t++) begin
        while ($urandom_range(3) == 0) begin in_valid <= 1'b0; @(posedge clk); end
        in_valid <= 1'b1;
        for (int q = 0; q < 4; q++) in_data[q] <= '{re: 18'(4*t+q), im: 18'(4*t+q+1000)};
        @(posedge clk);
        #1;
        checks++;
        if (load_full != (t == 63)) fail("load_full");
      end
      // Frame complete: offers must be refused until released.
      in_valid <= 1'b1;
      repeat (5) begin @(posedge clk); #1 checks++; if (!load_full) fail("full dropped"); end
      in_valid <= 1'b0;
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (pushes[c] != 16) fail("16 pushes per core");
        pushes[c] = 0;
      end
      load_clear <= 1'b1;
      @(posedge clk);
      load_clear <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
