// tb_gccu: drives the global controller with frames that become complete at
// chosen times and checks, cycle by cycle, its control word against an
// expected schedule: a swap only when a frame is loaded and no computation
// runs, then 4 x (16 operand cycles + 1 compute cycle) and 16 write-back
// cycles (84 busy cycles), frame_done after the last write-back cycle, the
// computed set toggling at every swap, and a 64-cycle output drain starting
// at a swap whenever the newly loaded set holds results.
module tb_gccu;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load_full, load_clear, drain_active, busy, frame_done;
  ctrl_t      ctrl;
  logic [5:0] drain_t;

  always #5 clk = ~clk;

  gccu dut (.*);

  // Expected-schedule model.
  int  e_cnt = -1;          // cycles since the last swap while busy, -1 = idle
  int  e_drain = -1;
  logic e_cb = 1'b1;
  int  e_frames = 0;
  int  n_swaps = 0, n_drains = 0;

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", m, $time);
  endtask

  always @(negedge clk) if (rst_n) begin
    logic exp_swap;
    exp_swap = load_full && (e_cnt < 0);
    checks++;
    if (load_clear != exp_swap) fail("swap");
    if (e_cnt >= 0) begin
      int c, s;
      phase_e ph;
      int jj;
      c = e_cnt;
      if (c < 68) begin
        s = c / 17;
        if (c % 17 == 16) begin ph = PH_COMP; jj = 0; end
        else              begin ph = PH_OPS;  jj = c % 17; end
      end else begin
        s = 3; ph = PH_WB; jj = c - 68;
      end
      checks++;
      if (ctrl.phase != ph || int'(ctrl.stage) != s || (ph != PH_COMP && int'(ctrl.j) != jj) || !busy)
        fail($sformatf("control word at busy cycle %0d: %s s%0d j%0d", c, ctrl.phase.name(), ctrl.stage, ctrl.j));
    end else begin
      checks++;
      if (busy || ctrl.phase != PH_IDLE) fail("not idle");
    end
    checks++;
    if (ctrl.comp_bank != e_cb) fail("computed set");
    checks++;
    if (drain_active != (e_drain >= 0) || (e_drain >= 0 && int'(drain_t) != e_drain)) fail("drain");
    checks++;
    if (frame_done != (e_cnt < 0 && e_frames > 0 && $past(busy))) fail("frame_done");
  end

  always @(posedge clk) if (rst_n) begin
    if (e_drain >= 0) e_drain = (e_drain == 63) ? -1 : e_drain + 1;
    if (load_full && e_cnt < 0) begin
      n_swaps++;
      e_cb = ~e_cb;
      e_cnt = 0;
      if (e_frames > 0) begin e_drain = 0; n_drains++; end
    end else if (e_cnt >= 0) begin
      if (e_cnt == 83) begin e_cnt = -1; e_frames++; end
      else e_cnt++;
    end
  end

  initial begin
    load_full = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Frames ready early (input waits), late (engine idles) and at random.
    for (int f = 0; f < 8; f++) begin
      int wait_c;
      wait_c = (f < 3) ? 10 : (f < 5) ? 120 : int'($urandom_range(150));
      repeat (wait_c) @(posedge clk);
      load_full <= 1'b1;
      @(posedge clk);
      while (!load_clear) @(posedge clk);
      load_full <= 1'b0;
    end
    repeat (100) @(posedge clk);
    checks++;
    if (n_swaps != 8 || n_drains != 7) fail($sformatf("%0d swaps, %0d drains", n_swaps, n_drains));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
