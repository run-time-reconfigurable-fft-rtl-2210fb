// tb_fifo16: drives random pushes and pops (never overflowing or
// underflowing) against a queue model, and checks the head word and the
// fill level every cycle; includes filling to 16, a push and pop together on
// a full buffer, and draining to empty.
module tb_fifo16;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       push, pop;
  cplx_t      din, dout;
  logic [4:0] count;
  cplx_t      model [$];
  int         n_fullpp = 0;

  always #5 clk = ~clk;

  fifo16 dut (.*);

  task automatic step(input logic pu, input logic po);
    push <= pu;
    pop  <= po;
    din  <= '{re: 18'($urandom), im: 18'($urandom)};
    @(posedge clk);
    if (po) void'(model.pop_front());
    if (pu) model.push_back(din);
    if (pu && po && model.size() == 16) n_fullpp++;
    push <= 1'b0;
    pop  <= 1'b0;
    #1;
    checks++;
    if (int'(count) != model.size()) begin
      failures++;
      $display("FAIL count %0d, expected %0d", count, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (dout != model[0]) begin
        failures++;
        $display("FAIL head %h, expected %h", dout, model[0]);
      end
    end
  endtask

  initial begin
    push = 1'b0; pop = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) step(1'b1, 1'b0);
    for (int i = 0; i < 20; i++) step(1'b1, 1'b1);   // full: replace the head each cycle
    for (int i = 0; i < 16; i++) step(1'b0, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      logic pu, po;
      pu = 1'($urandom);
      po = 1'($urandom);
      if (model.size() == 0) po = 1'b0;
      if (model.size() == 16 && !po) pu = 1'b0;
      step(pu, po);
    end
    checks++;
    if (n_fullpp == 0) begin failures++; $display("FAIL no push+pop when full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
