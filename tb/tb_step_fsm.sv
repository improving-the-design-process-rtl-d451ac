// tb_step_fsm: self-checking test of the freeze / single-step machine.
// The event line is driven as the synchronised level plus a rising-edge
// pulse, as the synchroniser would deliver them. The test checks that the
// enable drops in the very cycle the stop condition appears, with a capture
// in the next (first frozen) cycle; that the first rise of the line after the freeze (the
// emulator letting go of it) gives no step; that each low-high pulse from
// the host gives exactly one enabled cycle, one cycle after the rise, and a
// capture in the cycle after it; that clearing the stop resumes the run;
// and that in snapshot mode an event only raises capture, one cycle later.
module tb_step_fsm;
  import unshades_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic freeze_mode = 1'b1, stop = 1'b0, onset = 1'b0;
  logic line_level = 1'b0, line_rise = 1'b0;
  logic clock_enable, capture, frozen;
  step_state_t state;
  int   ce_cycles = 0, cap_cycles = 0, ce_frz = 0;

  always #5 clk = ~clk;

  step_fsm dut (.clk, .rst_n, .freeze_mode, .stop, .onset, .line_level, .line_rise,
                .clock_enable, .capture, .frozen, .state);

  always @(posedge clk) begin
    if (rst_n && clock_enable) ce_cycles++;
    if (rst_n && capture)      cap_cycles++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask

  task automatic next();
    @(negedge clk);
    #1;
  endtask

  // Drive the synchronised line level; a low-to-high change carries a
  // one-cycle rise pulse.
  task automatic set_line(logic v);
    line_rise  = v && !line_level;
    line_level = v;
    next();
    line_rise  = 1'b0;
    #1;
  endtask

  // Host asks for one step: line low for a few cycles, then high.
  task automatic host_step(int low_cycles);
    int ce0, cap0, wait_ce;
    set_line(1'b0);
    repeat (low_cycles - 1) next();
    check(!clock_enable && frozen, "frozen while line held low");
    ce0 = ce_cycles; cap0 = cap_cycles;
    // The rise is seen in this cycle; the step cycle follows.
    line_rise  = 1'b1;
    line_level = 1'b1;
    #1;
    check(!clock_enable, "no enable in the cycle of the rise");
    next();
    line_rise = 1'b0;
    #1;
    check(clock_enable && !capture, "single enabled cycle after rise");
    next();
    check(!clock_enable && capture, "capture in the cycle after the step");
    next();
    check(!clock_enable && !capture && frozen, "frozen again after capture");
    check(ce_cycles - ce0 == 1 && cap_cycles - cap0 == 1, "one step and one capture");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    next();
    rst_n = 1'b1;
    next();
    check(clock_enable && !capture && !frozen, "running after reset");
    repeat (5) next();
    // Freeze on the stop condition, in the same cycle.
    stop = 1'b1;
    #1 check(!clock_enable && !capture, "enable drops with the stop");
    next();
    ce_frz = ce_cycles;
    check(frozen && !clock_enable && capture && state == ST_FREEZE, "capture in first frozen cycle");
    next();
    check(frozen && !clock_enable && !capture && state == ST_RELEASE, "frozen");
    repeat (3) next();
    // The emulator lets go of the line: the rise must not step.
    set_line(1'b1);
    repeat (4) next();
    check(!clock_enable && state == ST_HELD && ce_cycles == ce_frz, "release is not a step");
    host_step(3);
    host_step(1);
    host_step(6);
    // Host pulls the line low already in the capture cycle of a step.
    set_line(1'b0);
    line_rise = 1'b1; line_level = 1'b1;
    next();
    line_rise = 1'b0;
    #1 check(clock_enable, "step");
    line_level = 1'b0;
    next();
    check(capture && !clock_enable, "capture");
    next();
    check(state == ST_LOW, "early low request kept");
    set_line(1'b1);
    check(clock_enable, "early request steps");
    repeat (3) next();
    check(ce_cycles == ce_frz + 5 && cap_cycles == 6, $sformatf("step counts ce=%0d cap=%0d", ce_cycles, cap_cycles));
    // Resume: stop condition cleared.
    stop = 1'b0;
    next();
    check(clock_enable && !frozen && state == ST_RUN, "resumed");
    // Snapshot mode: an event only captures.
    freeze_mode = 1'b0;
    next();
    stop = 1'b1; onset = 1'b1;
    #1 check(clock_enable && !capture, "no freeze in snapshot mode");
    next();
    onset = 1'b0;
    #1 check(clock_enable && capture, "snapshot capture one cycle after the event");
    next();
    check(clock_enable && !capture && !frozen, "runs on after snapshot");
    repeat (3) next();
    check(!frozen, "never frozen in snapshot mode");
    // Switching to freeze mode with the event still held freezes.
    freeze_mode = 1'b1;
    #1 check(!clock_enable && !capture, "freeze on mode switch with held event");
    next();
    check(frozen && capture, "frozen and captured after mode switch");
    // Stop going away while frozen returns to the run state.
    stop = 1'b0;
    next();
    check(!frozen && clock_enable, "run after stop cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
