// gccu: Global Control and Configuration Unit of the FFT engine.
//
// A state machine that coordinates the 16 cores, the input system and the
// output system:
//   - it tracks which of the two input-buffer sets is computed and which is
//     loaded, and switches them (a "swap") once a complete frame has been
//     loaded and the previous computation has finished;
//   - on a swap it starts the compute sequence, broadcast to all cores as a
//     control word: for each of the 4 stages 16 operand cycles (PH_OPS) and
//     one compute cycle (PH_COMP), then 16 write-back cycles (PH_WB);
//   - if the newly loaded set holds results of an earlier frame it starts the
//     output system's 64-cycle drain of that set at the same time, so input,
//     computation and output overlap;
//   - it reports the end of every computation (frame_done).
// That the GCCU sequences phases, switches the buffer sets and monitors
// completion follows the design; the phase encoding, the swap rule and the
// cycle counts are this implementation's choices. One frame takes 84 compute
// cycles plus one swap cycle, so a new frame can start every 85 cycles; if
// the next frame is loaded earlier the input system waits (in_ready low).
//
// The assertion samples rst_n synchronously (disable iff) while the flops use
// it asynchronously; lint tools may report rst_n as used both ways.
//
// Interface: load_full from the input system; load_clear re-arms it at a
// swap; drain_active/drain_t drive the output system.
module gccu
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_full,
  output logic       load_clear,
  output ctrl_t      ctrl,
  output logic       drain_active,
  output logic [5:0] drain_t,
  output logic       busy,
  output logic       frame_done
);
  logic       comp_bank;
  logic [1:0] has_result;
  phase_e     phase;
  logic [1:0] stage;
  logic [3:0] j;
  logic       swap;

  assign swap       = load_full && !busy;
  assign load_clear = swap;
  assign ctrl       = '{phase: phase, stage: stage, j: j, comp_bank: comp_bank};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_bank    <= 1'b1;          // set 0 is loaded first
      has_result   <= '0;
      phase        <= PH_IDLE;
      stage        <= '0;
      j            <= '0;
      busy         <= 1'b0;
      frame_done   <= 1'b0;
      drain_active <= 1'b0;
      drain_t      <= '0;
    end else begin
      frame_done <= 1'b0;

      // Output drain counter.
      if (drain_active) begin
        drain_t <= drain_t + 1'b1;
        if (drain_t == 6'd63) drain_active <= 1'b0;
      end

      if (swap) begin
        comp_bank <= ~comp_bank;
        busy      <= 1'b1;
        phase     <= PH_OPS;
        stage     <= '0;
        j         <= '0;
        if (has_result[comp_bank]) begin   // old computed set is the new loaded set
          has_result[comp_bank] <= 1'b0;
          drain_active          <= 1'b1;
          drain_t               <= '0;
        end
      end else begin
        unique case (phase)
          PH_OPS: begin
            j <= j + 1'b1;
            if (j == 4'd15) phase <= PH_COMP;
          end
          PH_COMP: begin
            j <= '0;
            if (stage == 2'(NSTAGES - 1)) phase <= PH_WB;
            else begin
              stage <= stage + 1'b1;
              phase <= PH_OPS;
            end
          end
          PH_WB: begin
            j <= j + 1'b1;
            if (j == 4'd15) begin
              phase                 <= PH_IDLE;
              busy                  <= 1'b0;
              has_result[comp_bank] <= 1'b1;
              frame_done            <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // A swap never interrupts a drain: the drain (64 cycles) is shorter than a
  // computation (84 cycles).
  a_drain_done: assert property (@(posedge clk) disable iff (!rst_n)
                                 swap |-> !drain_active);
endmodule
