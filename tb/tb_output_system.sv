// tb_output_system: models the 16 cores' drained input-buffer sets, where
// word j of core (r, q) is the result at flow-graph position
// n = 64r + 16q + 4*(j/4) + (j mod 4), i.e. X(k) with k the base-4 digit
// reversal of n. Each word carries its n. The testbench runs drains and
// checks that each core is popped 16 times in order, that four results per
// cycle come out one cycle later, and that every result is written to the
// address k equal to the digit reversal of its position, all 256 once.
module tb_output_system;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        drain_active;
  logic [5:0]  drain_t;
  cplx_t       core_out [NCORES];
  logic [15:0] drain_pop;
  logic [3:0]  out_valid;
  logic [7:0]  out_addr [4];
  cplx_t       out_data [4];

  always #5 clk = ~clk;

  output_system dut (.*);

  int popped [16];
  int seen [256];

  function automatic int digitrev(input int n);
    return 64*(n % 4) + 16*((n / 4) % 4) + 4*((n / 16) % 4) + (n / 64);
  endfunction

  always_comb
    for (int c = 0; c < 16; c++)
      core_out[c] = '{re: 18'(64*(c/4) + 16*(c%4) + 4*(popped[c]/4) + popped[c]%4), im: 18'(c)};

  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < 4; q++) if (out_valid[q]) begin
      int n, k;
      n = int'(out_data[q].re);
      k = int'(out_addr[q]);
      checks++;
      if (k != digitrev(n) || (k / 4) % 4 != q) begin
        failures++;
        if (failures < 10) $display("FAIL position %0d written to %0d", n, k);
      end
      seen[k]++;
    end
    for (int c = 0; c < 16; c++) if (drain_pop[c]) popped[c]++;
  end

  initial begin
    drain_active = 1'b0; drain_t = '0;
    for (int c = 0; c < 16; c++) popped[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < 256; k++) seen[k] = 0;
      for (int t = 0; t < 64; t++) begin
        drain_active <= 1'b1;
        drain_t      <= 6'(t);
        @(posedge clk);
      end
      drain_active <= 1'b0;
      repeat (3) @(posedge clk);
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (seen[k] != 1) begin failures++; $display("FAIL X(%0d) written %0d times", k, seen[k]); end
      end
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (popped[c] != 16) begin failures++; $display("FAIL core %0d popped %0d", c, popped[c]); end
        popped[c] = 0;
      end
      repeat ($urandom_range(5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
