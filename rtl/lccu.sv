// lccu: Local Control and Configuration Unit of one FFT core.
//
// Decodes the control word broadcast by the GCCU (phase, stage, cycle j,
// which input-buffer set is computed) into the core's local controls: the
// MUX1..MUX4 and DMUX selects, push/pop enables of the two input buffers,
// operand-register enables of the four butterflies, the local-buffer read
// address and the twiddle exponents. Its behaviour depends on the core's grid
// position (ROW, COL), which is what lets 16 identical cores cooperate.
//
// Data placement (n = 64*n3 + 16*n2 + 4*n1 + n0 is the input index):
//   stage 0: core (ROW,COL) holds n1=ROW, n0=COL;  butterflies over n3, b = n2
//   stage 1: holds n3=ROW, n0=COL; butterflies over n2, b = n1 (column swap)
//   stage 2: holds n3=ROW, n2=COL; butterflies over n1, b = n0 (row swap)
//   stage 3: same points;          butterflies over n0, b = n1 (local)
// In operand cycle j = 4g+h of stages 1 and 2 every core reads local-buffer
// entry 4g + ((pos-h) mod 4) onto its bus lane and takes its own operand from
// the lane of neighbour (pos+h) mod 4, pos being ROW for the vertical and COL
// for the horizontal exchange; the four sources then send to four different
// destinations in every cycle. The exchange after stages 0 and 1 only and
// the column/row groups follow the design's flow graph; the placement,
// the lane schedule and the twiddle exponents are derived in this
// implementation. Twiddle exponent of butterfly b (outputs use p, 2p, 3p):
//   stage 0: 16b + 4*ROW + COL;  stage 1: 4*(4b + COL);  stage 2: 16b;  stage 3: 0.
//
// Interface: ld_push (input system) and drain_pop (output system) are
// per-core strobes; all outputs are combinational decodes of the inputs.
module lccu
  import fft_pkg::*;
#(
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  ctrl_t      ctrl,
  input  logic       ld_push,
  input  logic       drain_pop,
  output logic [1:0] bank_push,
  output logic [1:0] bank_pop,
  output logic [1:0] mux1_wb,      // per set: 1 = write-back data, 0 = input system
  output opsrc_e     mux3_sel,
  output logic       mux2_vb,      // 1 = vertical bus, 0 = horizontal bus
  output logic [1:0] mux2_lane,
  output logic       mux4_sel,     // input-buffer set drained to the output
  output dmux_e      dmux_sel,
  output logic [3:0] op_we,
  output logic [1:0] op_idx,
  output logic       lb_we,
  output logic [3:0] lb_raddr,
  output logic [7:0] tw_base [4]
);
  localparam logic [1:0] R = 2'(ROW);
  localparam logic [1:0] C = 2'(COL);

  logic       cb, lb;    // computed and loaded set
  logic [1:0] g, h;

  assign cb = ctrl.comp_bank;
  assign lb = ~ctrl.comp_bank;
  assign g  = ctrl.j[3:2];
  assign h  = ctrl.j[1:0];

  always_comb begin
    bank_push = '0;
    bank_pop  = '0;
    mux1_wb   = '0;
    mux3_sel  = SRC_XCHG;
    mux2_vb   = 1'b0;
    mux2_lane = '0;
    mux4_sel  = lb;
    dmux_sel  = DM_NONE;
    op_we     = '0;
    op_idx    = '0;
    lb_we     = 1'b0;
    lb_raddr  = '0;
    for (int b = 0; b < 4; b++) tw_base[b] = '0;

    // Input system loads, output system drains: the set not being computed.
    bank_push[lb] = ld_push;
    bank_pop[lb]  = drain_pop;

    unique case (ctrl.phase)
      PH_OPS: begin
        unique case (ctrl.stage)
          2'd0: begin                       // from the computed input buffer
            bank_pop[cb]     = 1'b1;
            mux3_sel         = cb ? SRC_BANK1 : SRC_BANK0;
            op_we[ctrl.j[1:0]] = 1'b1;
            op_idx           = ctrl.j[3:2];
          end
          2'd1: begin                       // column exchange on the VB
            mux3_sel         = SRC_XCHG;
            mux2_vb          = 1'b1;
            mux2_lane        = R + h;
            op_we[R + h]     = 1'b1;
            op_idx           = g;
            lb_raddr         = {g, R - h};
            dmux_sel         = DM_VB;
          end
          2'd2: begin                       // row exchange on the HB
            mux3_sel         = SRC_XCHG;
            mux2_vb          = 1'b0;
            mux2_lane        = C + h;
            op_we[C + h]     = 1'b1;
            op_idx           = g;
            lb_raddr         = {g, C - h};
            dmux_sel         = DM_HB;
          end
          default: begin                    // no exchange before the last stage
            mux3_sel         = SRC_LOCAL;
            op_we[ctrl.j[1:0]] = 1'b1;
            op_idx           = ctrl.j[3:2];
            lb_raddr         = ctrl.j;
          end
        endcase
      end
      PH_COMP: begin
        lb_we = 1'b1;
        for (int b = 0; b < 4; b++) begin
          unique case (ctrl.stage)
            2'd0:    tw_base[b] = 8'(16 * b) + {4'd0, R, C};
            2'd1:    tw_base[b] = {2'b00, 2'(b), C, 2'b00};
            2'd2:    tw_base[b] = 8'(16 * b);
            default: tw_base[b] = '0;
          endcase
        end
      end
      PH_WB: begin
        lb_raddr      = ctrl.j;
        dmux_sel      = DM_WB;
        mux1_wb[cb]   = 1'b1;
        bank_push[cb] = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
