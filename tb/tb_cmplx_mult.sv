// tb_cmplx_mult: checks the three-multiplier complex product against
// (xr*wr - xi*wi, xr*wi + xi*wr) computed directly, for every twiddle of the
// coefficient table and for random data and twiddle words.
module tb_cmplx_mult;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [17:0] xr, xi;
  logic signed [7:0]  wr, wi;
  logic signed [25:0] pr, pi;

  cmplx_mult dut (.*);

  task automatic check(input int a, input int b, input int c, input int d);
    longint er, ei;
    xr = 18'(a); xi = 18'(b); wr = 8'(c); wi = 8'(d); #1;
    er = longint'(xr) * wr - longint'(xi) * wi;
    ei = longint'(xr) * wi + longint'(xi) * wr;
    checks++;
    if (longint'(pr) != er || longint'(pi) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d), got (%0d,%0d)", xr, xi, wr, wi, er, ei, pr, pi);
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) begin
      check(65536, -65536, ref_twr(k), ref_twi(k));
      check(int'($urandom_range(262143)) - 131072, int'($urandom_range(262143)) - 131072,
            ref_twr(k), ref_twi(k));
    end
    for (int i = 0; i < 3000; i++)
      check(int'($urandom_range(131072)) - 65536, int'($urandom_range(131072)) - 65536,
            int'($urandom_range(254)) - 127, int'($urandom_range(254)) - 127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
