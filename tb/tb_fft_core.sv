// tb_fft_core: one FFT core (grid row 1, column 2) taken through a complete
// frame by a control sequence like the GCCU's, with its bus neighbours
// replaced by random words.
//
// The core loads 16 words into input-buffer set 0, computes stage 0 from
// them, takes stage-1 operands from random vertical-bus lanes and stage-2
// operands from random horizontal-bus lanes, stage 3 from its own local
// buffer, writes the results back into set 0 and is drained. The testbench
// follows the same data through the reference butterfly, with the operand
// placement and twiddle exponents it works out for this core, and checks
// the words the core puts on its own bus lanes during the exchanges and the
// drained results. The next frame's samples are pushed into set 0 while it
// drains, and NFRM frames are run this way.
module tb_fft_core;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  localparam int R = 1, C = 2;
  localparam int NFRM = 8;      // frames run back to back
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  ctrl_t      ctrl;
  logic       ld_push, drain_pop;
  cplx_t      ld_data, out_data, hb_out, vb_out;
  cplx_t      hb_in [4], vb_in [4];
  logic [4:0] set_count [2];

  always #5 clk = ~clk;

  fft_core #(.ROW(R), .COL(C)) dut (.*);

  int opr [4][4], opi [4][4];   // [butterfly][operand]
  int lbr [16], lbi [16];       // expected local buffer

  task automatic compute(input int s);
    for (int b = 0; b < 4; b++) begin
      int ar [4], ai [4], yr [4], yi [4], p;
      for (int i = 0; i < 4; i++) begin ar[i] = opr[b][i]; ai[i] = opi[b][i]; end
      case (s)
        0: p = 16*b + 4*R + C;
        1: p = 4*(4*b + C);
        2: p = 16*b;
        default: p = 0;
      endcase
      ref_bfly(ar, ai, p, yr, yi);
      for (int i = 0; i < 4; i++) begin lbr[4*b+i] = yr[i]; lbi[4*b+i] = yi[i]; end
    end
    ctrl <= '{phase: PH_COMP, stage: 2'(s), j: 4'd0, comp_bank: 1'b0};
    @(posedge clk);
  endtask

  function automatic cplx_t rnd();
    return '{re: 18'(int'($urandom_range(131072)) - 65536),
             im: 18'(int'($urandom_range(131072)) - 65536)};
  endfunction

  initial begin
    cplx_t w;
    ctrl = '{phase: PH_IDLE, stage: 2'd0, j: 4'd0, comp_bank: 1'b1};
    ld_push = 1'b0; drain_pop = 1'b0; ld_data = '0;
    for (int l = 0; l < 4; l++) begin hb_in[l] = '0; vb_in[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // Load 16 words into set 0 (the loaded set while set 1 is computed).
    for (int j = 0; j < 16; j++) begin
      w = rnd();
      ld_push <= 1'b1; ld_data <= w;
      opr[j % 4][j / 4] = int'(w.re); opi[j % 4][j / 4] = int'(w.im);
      @(posedge clk);
    end
    ld_push <= 1'b0;
    @(posedge clk);
    for (int frame = 0; frame < NFRM; frame++) begin
      #1 checks++; if (set_count[0] != 5'd16 || set_count[1] != 5'd0) begin failures++; $display("FAIL load count"); end
      // Stage 0 from set 0.
      for (int j = 0; j < 16; j++) begin
        ctrl <= '{phase: PH_OPS, stage: 2'd0, j: 4'(j), comp_bank: 1'b0};
        @(posedge clk);
      end
      compute(0);
      // Stages 1 (vertical bus) and 2 (horizontal bus).
      for (int s = 1; s <= 2; s++) begin
        int pos;
        pos = (s == 1) ? R : C;
        for (int j = 0; j < 16; j++) begin
          int g, h, a, lane;
          g = j / 4; h = j % 4;
          for (int l = 0; l < 4; l++) begin
            w = rnd();
            if (s == 1) vb_in[l] <= w; else hb_in[l] <= w;
            if (l == (pos + h) % 4) begin opr[l][g] = int'(w.re); opi[l][g] = int'(w.im); end
          end
          ctrl <= '{phase: PH_OPS, stage: 2'(s), j: 4'(j), comp_bank: 1'b0};
          @(negedge clk);
          a = 4*g + ((pos - h + 4) % 4);
          checks++;
          if ((s == 1 ? vb_out : hb_out) != '{re: 18'(lbr[a]), im: 18'(lbi[a])} ||
              (s == 1 ? hb_out : vb_out) != '0) begin
            failures++;
            $display("FAIL stage %0d j %0d: lane word %h, expected entry %0d", s, j,
                     (s == 1 ? vb_out : hb_out), a);
          end
          @(posedge clk);
        end
        compute(s);
      end
      // Stage 3 from the own local buffer.
      for (int j = 0; j < 16; j++) begin
        opr[j % 4][j / 4] = lbr[j]; opi[j % 4][j / 4] = lbi[j];
        ctrl <= '{phase: PH_OPS, stage: 2'd3, j: 4'(j), comp_bank: 1'b0};
        @(posedge clk);
      end
      compute(3);
      // Write-back into set 0.
      for (int j = 0; j < 16; j++) begin
        ctrl <= '{phase: PH_WB, stage: 2'd3, j: 4'(j), comp_bank: 1'b0};
        @(posedge clk);
      end
      ctrl <= '{phase: PH_IDLE, stage: 2'd0, j: 4'd0, comp_bank: 1'b1};
      @(posedge clk);
      #1 checks++; if (set_count[0] != 5'd16) begin failures++; $display("FAIL write-back count %0d", set_count[0]); end
      // Drain set 0 while the next frame's samples enter it.
      for (int j = 0; j < 16; j++) begin
        w = rnd();
        drain_pop <= 1'b1; ld_push <= 1'b1; ld_data <= w;
        @(negedge clk);
        checks++;
        if (out_data != '{re: 18'(lbr[j]), im: 18'(lbi[j])}) begin
          failures++;
          $display("FAIL result %0d = (%0d,%0d), expected (%0d,%0d)", j, out_data.re, out_data.im, lbr[j], lbi[j]);
        end
        @(posedge clk);
        opr[j % 4][j / 4] = int'(w.re); opi[j % 4][j / 4] = int'(w.im);
      end
      drain_pop <= 1'b0; ld_push <= 1'b0;
      @(posedge clk);
      #1 checks++; if (set_count[0] != 5'd16) begin failures++; $display("FAIL refill count"); end
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
