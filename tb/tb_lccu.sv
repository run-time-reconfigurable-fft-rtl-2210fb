// tb_lccu: checks the local controllers of a full 4 x 4 grid against the
// data placement they must realise, without reusing their formulas.
//
// Every point of the frame is identified by its index n. For each stage the
// operand (butterfly b, operand i) of core (r, q) must be the point
//   stage 0: n3=i n2=b n1=r n0=q     stage 1: n3=r n2=i n1=b n0=q
//   stage 2: n3=r n2=q n1=i n0=b     stage 3: n3=r n2=q n1=b n0=i
// and a core's local buffer entry 4b+i holds what its butterfly b produced
// at position i. The testbench steps the 16 controllers through a frame and,
// in every operand cycle, follows each write to its source (input-buffer
// order, a neighbour's lane on the right bus with the right DMUX setting, or
// the own buffer) to confirm the right point arrives, and that every operand
// register is written exactly once per stage. It checks the twiddle exponent
// of every butterfly in the compute cycles, the write-back and the
// input/output buffer-set selection.
module tb_lccu;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  ctrl_t      ctrl;
  logic       ld_push, drain_pop;
  logic [1:0] bank_push [16], bank_pop [16], mux1_wb [16];
  opsrc_e     mux3_sel [16];
  logic       mux2_vb [16], mux4_sel [16];
  logic [1:0] mux2_lane [16], op_idx [16];
  dmux_e      dmux_sel [16];
  logic [3:0] op_we [16], lb_raddr [16];
  logic       lb_we [16];
  logic [7:0] tw_base [16][4];

  for (genvar r = 0; r < 4; r++) begin : g_r
    for (genvar q = 0; q < 4; q++) begin : g_q
      logic [7:0] tb_ [4];
      lccu #(.ROW(r), .COL(q)) dut (
        .ctrl, .ld_push, .drain_pop,
        .bank_push(bank_push[4*r+q]), .bank_pop(bank_pop[4*r+q]), .mux1_wb(mux1_wb[4*r+q]),
        .mux3_sel(mux3_sel[4*r+q]), .mux2_vb(mux2_vb[4*r+q]), .mux2_lane(mux2_lane[4*r+q]),
        .mux4_sel(mux4_sel[4*r+q]), .dmux_sel(dmux_sel[4*r+q]), .op_we(op_we[4*r+q]),
        .op_idx(op_idx[4*r+q]), .lb_we(lb_we[4*r+q]), .lb_raddr(lb_raddr[4*r+q]),
        .tw_base(tb_)
      );
      assign tw_base[4*r+q] = tb_;
    end
  end

  function automatic int pt(input int d3, input int d2, input int d1, input int d0);
    return 64*d3 + 16*d2 + 4*d1 + d0;
  endfunction

  function automatic int opnd(input int s, input int r, input int q, input int b, input int i);
    case (s)
      0:       return pt(i, b, r, q);
      1:       return pt(r, i, b, q);
      2:       return pt(r, q, i, b);
      default: return pt(r, q, b, i);
    endcase
  endfunction

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL %s", m);
  endtask

  initial begin
    int written [16][16];
    ld_push = 1'b0; drain_pop = 1'b0;
    for (int cb = 0; cb < 2; cb++) begin
      for (int s = 0; s < 4; s++) begin
        for (int c = 0; c < 16; c++) for (int k = 0; k < 16; k++) written[c][k] = 0;
        for (int j = 0; j < 16; j++) begin
          ctrl = '{phase: PH_OPS, stage: 2'(s), j: 4'(j), comp_bank: 1'(cb)};
          #1;
          for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++) begin
            int c, b, i, src, srcpt, sr, sq;
            c = 4*r + q;
            checks++;
            if ($countones(op_we[c]) != 1) begin fail("not one operand write"); continue; end
            b = $clog2(int'(op_we[c]));
            i = int'(op_idx[c]);
            written[c][4*b+i]++;
            case (s)
              0: begin
                if (mux3_sel[c] != (cb ? SRC_BANK1 : SRC_BANK0) || bank_pop[c][cb] !== 1'b1)
                  fail("stage 0 source");
                srcpt = pt(j / 4, j % 4, r, q);     // load order: word 4*n3 + n2
              end
              1, 2: begin
                if (mux3_sel[c] != SRC_XCHG || mux2_vb[c] != (s == 1)) fail("bus select");
                if (s == 1) begin sr = int'(mux2_lane[c]); sq = q; end
                else        begin sr = r; sq = int'(mux2_lane[c]); end
                src = 4*sr + sq;
                if (dmux_sel[src] != (s == 1 ? DM_VB : DM_HB)) fail("source dmux");
                srcpt = opnd(s - 1, sr, sq, int'(lb_raddr[src]) / 4, int'(lb_raddr[src]) % 4);
              end
              default: begin
                if (mux3_sel[c] != SRC_LOCAL) fail("stage 3 source");
                srcpt = opnd(2, r, q, int'(lb_raddr[c]) / 4, int'(lb_raddr[c]) % 4);
              end
            endcase
            checks++;
            if (srcpt != opnd(s, r, q, b, i))
              fail($sformatf("stage %0d core %0d j %0d: b%0d op%0d gets point %0d, needs %0d",
                             s, c, j, b, i, srcpt, opnd(s, r, q, b, i)));
          end
        end
        for (int c = 0; c < 16; c++) for (int k = 0; k < 16; k++) begin
          checks++;
          if (written[c][k] != 1) fail("operand register not written exactly once");
        end
        // Compute cycle: twiddle exponent = (n mod L/4) * 256/L.
        ctrl = '{phase: PH_COMP, stage: 2'(s), j: 4'd0, comp_bank: 1'(cb)};
        #1;
        for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++) for (int b = 0; b < 4; b++) begin
          int L, e;
          L = 256 >> (2 * s);
          e = (opnd(s, r, q, b, 0) % (L / 4)) * (256 / L);
          checks++;
          if (!lb_we[4*r+q] || int'(tw_base[4*r+q][b]) != e)
            fail($sformatf("twiddle stage %0d core %0d b %0d: %0d, expected %0d",
                           s, 4*r+q, b, tw_base[4*r+q][b], e));
        end
      end
      // Write-back and load/drain routing.
      for (int j = 0; j < 16; j++) begin
        ctrl = '{phase: PH_WB, stage: 2'd3, j: 4'(j), comp_bank: 1'(cb)};
        ld_push = 1'(j); drain_pop = 1'(j >> 1);
        #1;
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (dmux_sel[c] != DM_WB || int'(lb_raddr[c]) != j || !bank_push[c][cb] ||
              !mux1_wb[c][cb] || mux1_wb[c][1-cb] || bank_push[c][1-cb] != ld_push ||
              bank_pop[c][1-cb] != drain_pop || bank_pop[c][cb] || mux4_sel[c] != 1'(1-cb) ||
              op_we[c] != '0)
            fail("write-back controls");
        end
      end
      ld_push = 1'b0; drain_pop = 1'b0;
    end
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
