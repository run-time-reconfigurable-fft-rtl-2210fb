// tb_booth_mult: checks the radix-4 Booth multiplier against the language's
// own signed multiplication, for the corner values of both operands and for
// random operands, at the two shapes the complex multiplier uses (19x8 and
// 18x9 bits).
module tb_booth_mult;
  int checks = 0, failures = 0;

  logic signed [18:0] a1; logic signed [7:0] b1; logic signed [26:0] p1;
  logic signed [17:0] a2; logic signed [8:0] b2; logic signed [26:0] p2;

  booth_mult #(.WA(19), .WB(8)) dut1 (.a(a1), .b(b1), .p(p1));
  booth_mult #(.WA(18), .WB(9)) dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check1(input logic signed [18:0] a, input logic signed [7:0] b);
    longint e;
    a1 = a; b1 = b; #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p1) != e) begin
      failures++;
      if (failures < 10) $display("FAIL 19x8: %0d * %0d = %0d, got %0d", a, b, e, p1);
    end
  endtask

  task automatic check2(input logic signed [17:0] a, input logic signed [8:0] b);
    longint e;
    a2 = a; b2 = b; #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p2) != e) begin
      failures++;
      if (failures < 10) $display("FAIL 18x9: %0d * %0d = %0d, got %0d", a, b, e, p2);
    end
  endtask

  initial begin
    logic signed [18:0] ca [6];
    logic signed [7:0]  cb [6];
    ca = '{19'sh20000, 19'sh3FFFF >>> 1, 0, 1, -1, 19'sh40000};
    cb = '{8'sh80, 8'sh7F, 0, 1, -1, 8'sh40};
    for (int i = 0; i < 6; i++)
      for (int k = 0; k < 6; k++) begin
        check1(ca[i], cb[k]);
        check2(18'(ca[i]), 9'(cb[k]));
      end
    for (int b = -256; b < 256; b++) check2(18'sh1ABCD, 9'(b));
    for (int i = 0; i < 3000; i++) begin
      check1(19'($urandom), 8'($urandom));
      check2(18'($urandom), 9'($urandom));
    end
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
