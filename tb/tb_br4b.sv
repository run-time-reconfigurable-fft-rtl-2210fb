// tb_br4b: loads random operands into the butterfly's operand registers, one
// complex word per cycle, and compares the four outputs with the reference
// butterfly (sum, scale by 1/4, twiddles W^p, W^2p, W^3p, truncation) for
// random and edge-case twiddle exponents, including full-scale operands.
module tb_br4b;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       op_we;
  logic [1:0] op_idx;
  cplx_t      op_data;
  logic [7:0] tw_base;
  cplx_t      y [4];

  always #5 clk = ~clk;

  br4b dut (.*);

  task automatic run(input int ar [4], input int ai [4], input int p);
    int yr [4], yi [4];
    for (int i = 0; i < 4; i++) begin
      op_we   <= 1'b1;
      op_idx  <= 2'(i);
      op_data <= '{re: 18'(ar[i]), im: 18'(ai[i])};
      @(posedge clk);
    end
    op_we   <= 1'b0;
    tw_base <= 8'(p);
    @(posedge clk);
    #1;
    ref_bfly(ar, ai, p, yr, yi);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(y[i].re) != yr[i] || int'(y[i].im) != yi[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%0d y%0d = (%0d,%0d), expected (%0d,%0d)", p, i, y[i].re, y[i].im, yr[i], yi[i]);
      end
    end
  endtask

  initial begin
    int ar [4], ai [4];
    op_we = 1'b0; op_idx = '0; op_data = '0; tw_base = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // After reset the operand registers hold zero.
    #1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (y[i] != '0) failures++;
    end
    // Full-scale corner: all operands +1 or -1.
    ar = '{65536, 65536, 65536, 65536}; ai = '{-65536, -65536, -65536, -65536};
    run(ar, ai, 0);
    ar = '{65536, -65536, 65536, -65536}; ai = '{65536, 65536, -65536, -65536};
    run(ar, ai, 63);
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 4; i++) begin
        ar[i] = int'($urandom_range(131072)) - 65536;
        ai[i] = int'($urandom_range(131072)) - 65536;
      end
      run(ar, ai, (n < 256) ? n : int'($urandom_range(255)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
