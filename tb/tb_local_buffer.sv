// tb_local_buffer: writes 16 random words in parallel and reads every
// address back, several times; checks that the contents hold while the
// write enable is low and that reset clears the buffer.
module tb_local_buffer;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       we;
  cplx_t      din [CPTS];
  logic [3:0] raddr;
  cplx_t      dout;
  cplx_t      model [CPTS];

  always #5 clk = ~clk;

  local_buffer dut (.*);

  task automatic read_all();
    for (int a = 0; a < CPTS; a++) begin
      raddr = 4'(a); #1;
      checks++;
      if (dout != model[a]) begin
        failures++;
        $display("FAIL entry %0d = %h, expected %h", a, dout, model[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; raddr = '0;
    for (int i = 0; i < CPTS; i++) begin din[i] = '0; model[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    read_all();
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int i = 0; i < CPTS; i++) din[i] = '{re: 18'($urandom), im: 18'($urandom)};
      we = 1'b1;
      @(negedge clk);
      we = 1'b0;
      for (int i = 0; i < CPTS; i++) model[i] = din[i];
      for (int i = 0; i < CPTS; i++) din[i] = '{re: 18'($urandom), im: 18'($urandom)};
      @(negedge clk);
      read_all();
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
