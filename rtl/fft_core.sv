// fft_core: one of the 16 FFT cores; a 16-point slice of the 256-point FFT.
//
// A core holds 16 complex points of the frame and runs the four radix-4
// butterflies (BR4B) that a stage needs on them, in parallel. Its parts:
//   - two input-buffer sets (fifo16): one is loaded by the input system and
//     drained by the output system while the other is computed on; the
//     computed set also receives the frame's final results (write-back);
//   - MUX1 (one per set): input-system data or write-back data into a set;
//   - MUX2: picks one of the four horizontal-bus (HB) or four vertical-bus
//     (VB) lanes of the core's row/column, i.e. a neighbour's local buffer;
//   - MUX3: operand source = set 0, set 1, MUX2 or the own local buffer;
//   - four BR4B and the local result buffer (local 16FIFO);
//   - DMUX: sends the local-buffer word to this core's HB lane, VB lane or
//     back into the computed set;
//   - MUX4: which set feeds the output (vertical output bus);
//   - the LCCU, decoding the GCCU control word.
// The parts and their connection follow the design's core diagram; one MUX1
// per set (so that loading and write-back overlap) and the lane structure of
// the buses are this implementation's choices.
//
// Timing per frame (all cores in lock-step): for each of the 4 stages,
// 16 operand cycles (one word per cycle into one operand register) and one
// compute cycle; then 16 write-back cycles. Bus lanes (hb_out, vb_out) are
// combinational from the local buffer; neighbours register them into their
// operand registers in the same cycle.
module fft_core
  import fft_pkg::*;
#(
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  logic  ld_push,       // input system: push ld_data into the loaded set
  input  cplx_t ld_data,
  input  logic  drain_pop,     // output system: pop out_data from the loaded set
  output cplx_t out_data,
  input  cplx_t hb_in [4],     // HB lanes of this row (index = column)
  input  cplx_t vb_in [4],     // VB lanes of this column (index = row)
  output cplx_t hb_out,
  output cplx_t vb_out,
  output logic [4:0] set_count [2]
);
  logic [1:0] bank_push, bank_pop, mux1_wb;
  opsrc_e     mux3_sel;
  logic       mux2_vb, mux4_sel;
  logic [1:0] mux2_lane;
  dmux_e      dmux_sel;
  logic [3:0] op_we, lb_raddr;
  logic [1:0] op_idx;
  logic       lb_we;
  logic [7:0] tw_base [4];

  lccu #(.ROW(ROW), .COL(COL)) u_lccu (
    .ctrl, .ld_push, .drain_pop,
    .bank_push, .bank_pop, .mux1_wb, .mux3_sel, .mux2_vb, .mux2_lane,
    .mux4_sel, .dmux_sel, .op_we, .op_idx, .lb_we, .lb_raddr, .tw_base
  );

  // Local buffer and DMUX.
  cplx_t lb_din [CPTS];
  cplx_t lb_dout, wb_data;

  local_buffer u_lbuf (
    .clk, .rst_n, .we(lb_we), .din(lb_din), .raddr(lb_raddr), .dout(lb_dout)
  );

  assign hb_out  = (dmux_sel == DM_HB) ? lb_dout : '0;
  assign vb_out  = (dmux_sel == DM_VB) ? lb_dout : '0;
  assign wb_data = (dmux_sel == DM_WB) ? lb_dout : '0;

  // Input-buffer sets with their MUX1.
  cplx_t set_din  [2];
  cplx_t set_dout [2];

  for (genvar s = 0; s < 2; s++) begin : g_set
    assign set_din[s] = mux1_wb[s] ? wb_data : ld_data;
    fifo16 u_fifo (
      .clk, .rst_n,
      .push(bank_push[s]), .din(set_din[s]),
      .pop(bank_pop[s]),   .dout(set_dout[s]),
      .count(set_count[s])
    );
  end

  // MUX4: output path.
  assign out_data = set_dout[mux4_sel];

  // MUX2 and MUX3: operand source.
  cplx_t xchg, opnd;
  assign xchg = mux2_vb ? vb_in[mux2_lane] : hb_in[mux2_lane];

  always_comb begin
    unique case (mux3_sel)
      SRC_BANK0: opnd = set_dout[0];
      SRC_BANK1: opnd = set_dout[1];
      SRC_XCHG:  opnd = xchg;
      default:   opnd = lb_dout;
    endcase
  end

  // Four basic radix-4 butterflies.
  for (genvar b = 0; b < 4; b++) begin : g_bf
    cplx_t y [4];
    br4b u_bf (
      .clk, .rst_n,
      .op_we(op_we[b]), .op_idx, .op_data(opnd),
      .tw_base(tw_base[b]),
      .y
    );
    for (genvar i = 0; i < 4; i++) begin : g_o
      assign lb_din[4*b + i] = y[i];
    end
  end
endmodule
