// tb_twiddle_rom: reads all 256 entries of the coefficient ROM and compares
// them with round(64*cos(2*pi*k/256)) and round(-64*sin(2*pi*k/256)); also
// checks the exact values at the quarter points.
module tb_twiddle_rom;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] addr;
  twid_t      w;

  twiddle_rom dut (.addr, .w);

  initial begin
    for (int k = 0; k < 256; k++) begin
      addr = 8'(k); #1;
      checks++;
      if (int'(w.re) != ref_twr(k) || int'(w.im) != ref_twi(k)) begin
        failures++;
        $display("FAIL W^%0d = (%0d,%0d), expected (%0d,%0d)", k, w.re, w.im, ref_twr(k), ref_twi(k));
      end
    end
    addr = 8'd0;   #1; checks++; if (w.re != 8'sd64  || w.im != 8'sd0)   failures++;
    addr = 8'd64;  #1; checks++; if (w.re != 8'sd0   || w.im != -8'sd64) failures++;
    addr = 8'd128; #1; checks++; if (w.re != -8'sd64 || w.im != 8'sd0)   failures++;
    addr = 8'd32;  #1; checks++; if (w.re != 8'sd45  || w.im != -8'sd45) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
