// fft_engine: run-time reconfigurable 256-point radix-4 FFT engine (top).
//
// Sixteen identical FFT cores in a 4 x 4 grid share one set of hardware for
// all four radix-4 stages of a 256-point decimation-in-frequency FFT: each
// core computes four butterflies per stage on its 16 points, stores the
// results locally and exchanges them with the cores of its column (vertical
// buses, after stage 1) or its row (horizontal buses, after stage 2) before
// reusing the same butterflies for the next stage. Every core has two input
// buffer sets, so a frame is loaded (and the previous result written out)
// while the frame before it is computed. The input system feeds the cores
// over four input buses, one per grid column; the output system collects
// results over the vertical buses; the GCCU sequences everything.
//
// Data: 18-bit two's complement real and imaginary parts, 16 fraction bits.
// Every butterfly scales by 1/4, so the output is DFT(x)/256:
//   X(k) = (1/256) * sum_n x(n) * exp(-j*2*pi*n*k/256), rounded down.
//
// Interface:
//   in_valid/in_ready/in_data[q]: four samples x(4t+q) per accepted cycle,
//     64 cycles per frame, frames back to back.
//   out_valid[q]/out_addr[q]/out_data[q]: four results per cycle, X(out_addr).
//   frame_done: pulses when the computation of a frame is finished.
// Timing: the results of a frame are written out while the frame after the
// next one is being loaded (a frame's results leave when the following frame
// is complete and starts computing). A new frame can start every 85 cycles.
//
// Bus structure follows the design's engine diagram; each bus is made of one
// lane per core (the core's local-buffer output), of which the reader picks
// one, and the vertical output bus is separate from the exchange lanes so
// that output and computation overlap. These are this implementation's
// choices.
module fft_engine
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data [4],
  output logic [3:0] out_valid,
  output logic [7:0] out_addr [4],
  output cplx_t      out_data [4],
  output logic       frame_done,
  output logic       busy
);
  ctrl_t       ctrl;
  logic        load_full, load_clear, drain_active;
  logic [5:0]  drain_t;
  cplx_t       ib_data [4];
  logic [15:0] ld_push, drain_pop;
  cplx_t       core_out [NCORES];
  cplx_t       hb_lane  [NCORES];
  cplx_t       vb_lane  [NCORES];
  logic [4:0]  set_lvl  [NCORES][2];

  gccu u_gccu (
    .clk, .rst_n, .load_full, .load_clear, .ctrl,
    .drain_active, .drain_t, .busy, .frame_done
  );

  input_system u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .load_clear, .load_full, .ib_data, .ld_push
  );

  output_system u_out (
    .clk, .rst_n, .drain_active, .drain_t, .core_out,
    .drain_pop, .out_valid, .out_addr, .out_data
  );

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar q = 0; q < 4; q++) begin : g_col
      cplx_t      hb_in [4];
      cplx_t      vb_in [4];
      for (genvar k = 0; k < 4; k++) begin : g_lane
        assign hb_in[k] = hb_lane[4*r + k];   // row r, column k
        assign vb_in[k] = vb_lane[4*k + q];   // row k, column q
      end
      fft_core #(.ROW(r), .COL(q)) u_core (
        .clk, .rst_n, .ctrl,
        .ld_push(ld_push[4*r + q]), .ld_data(ib_data[q]),
        .drain_pop(drain_pop[4*r + q]), .out_data(core_out[4*r + q]),
        .hb_in, .vb_in,
        .hb_out(hb_lane[4*r + q]), .vb_out(vb_lane[4*r + q]),
        .set_count(set_lvl[4*r + q])
      );
    end
  end

  // All cores compute in lock-step, so the fill levels of their computed
  // sets are equal; the loaded sets are filled and drained row by row, so
  // there the cores of one row agree.
  for (genvar c = 1; c < NCORES; c++) begin : g_lockstep
    a_lockstep_comp: assert property (@(posedge clk) disable iff (!rst_n)
        set_lvl[c][ctrl.comp_bank] == set_lvl[0][ctrl.comp_bank]);
    a_lockstep_row:  assert property (@(posedge clk) disable iff (!rst_n)
        set_lvl[c][!ctrl.comp_bank] == set_lvl[4*(c/4)][!ctrl.comp_bank]);
  end
endmodule
