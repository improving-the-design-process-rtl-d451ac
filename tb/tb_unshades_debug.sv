// tb_unshades_debug: end-to-end test of the debug controller at its default
// size (4 conditions of 16 bits, 2-stage synchronisers), with no parameter
// overridden.
//
// The testbench builds the whole debug set-up around the controller: a
// small circuit under debug (a counter and an LFSR, every flip-flop on the
// controller's clock enable), a model of the FPGA state-capture primitive
// with byte-wise readback, the event pad as a wired-AND line with a pull-up
// (low if either the emulator or the host drives it), and a host that
// polls the event line, reads the snapshot back, steps and resumes.
//
// Scenario and what is checked against values worked out here:
//   1. run; the event line must read low while running;
//   2. condition 0 (count == 100) freezes the circuit on exactly that state;
//      the snapshot read back holds count 100 and event flag 0;
//   3. five single steps from the host, each advancing the circuit by one
//      cycle; the step cycle comes SYNC_STAGES+1 clocks after the host lets
//      the line go; each snapshot holds the new count;
//   4. resume; the line goes low again;
//   5. condition 1 on the LFSR (value after 200 steps, computed here);
//      resume while that condition is still true must not re-freeze;
//   6. conditions 2 and 3 hit together (count == 300): both flags shown;
//   7. snapshot mode: the event at count 500 gives one capture (state one
//      cycle after the match) and the circuit does not stop or lose cycles.
// Each mechanism is counted and a mechanism that never happened fails.
module tb_unshades_debug;
  import unshades_pkg::*;

  localparam int N = 4;
  localparam int W = 16;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic freeze_mode = 1'b1;
  logic [N-1:0][W-1:0] watch, ref_value;
  logic event_line, event_pull_low, host_pull_low = 1'b0;
  logic resume_line = 1'b0;
  logic clock_enable, capture, frozen;
  logic [N-1:0] event_flags;
  step_state_t step_state;

  logic [15:0] count, lfsr;
  logic [7:0]  rb_addr = '0, rb_data;
  int          captures;
  longint      cycles = 0, ce_cycles = 0;

  // Mechanism counters.
  int n_freeze = 0, n_step = 0, n_capture_frozen = 0, n_resume = 0;
  int n_multi = 0, n_snapshot = 0, n_masked_resume = 0, n_release_ignored = 0;

  always #5 clk = ~clk;

  // Open-collector event line with external pull-up.
  assign event_line = ~(event_pull_low | host_pull_low);

  unshades_debug dut (
    .clk, .rst_n, .freeze_mode, .watch, .ref_value,
    .event_line_in (event_line),
    .event_pull_low,
    .resume_line,
    .clock_enable, .capture, .frozen, .event_flags, .step_state
  );

  debug_target target (.clk, .rst_n, .ce(clock_enable), .count, .lfsr);

  capture_model #(.STATE_W(36)) cap_model (
    .clk_cap (clk), .cap(capture), .state({event_flags, lfsr, count}),
    .rb_addr, .rb_data, .captures
  );

  always_comb begin
    watch[0] = count;
    watch[1] = lfsr;
    watch[2] = count;
    watch[3] = count;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (clock_enable) ce_cycles++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask

  // Independent LFSR step (taps 16,14,13,11).
  function automatic logic [15:0] lfsr_next(logic [15:0] v);
    logic fb;
    fb = v[15] ^ v[13] ^ v[12] ^ v[10];
    return {v[14:0], fb};
  endfunction

  typedef struct {
    logic [15:0] count;
    logic [15:0] lfsr;
    logic [3:0]  flags;
  } snapshot_t;

  task automatic readback(output snapshot_t s);
    logic [7:0] b [5];
    for (int i = 0; i < 5; i++) begin
      rb_addr = 8'(i);
      #1 b[i] = rb_data;
    end
    s.count = {b[1], b[0]};
    s.lfsr  = {b[3], b[2]};
    s.flags = b[4][3:0];
  endtask

  // The host polls the event line (off the clock edges) until it is high.
  task automatic wait_event_line(int max_cycles, string what);
    int n = 0;
    while (!event_line && n < max_cycles) begin
      #7;
      n++;
    end
    check(event_line, {"event line raised: ", what});
    // Time the host takes before it starts a readback.
    repeat (3) @(negedge clk);
  endtask

  task automatic host_step(int expect_count);
    int   cap0, edges;
    snapshot_t s;
    cap0 = captures;
    @(negedge clk);
    #2 host_pull_low = 1'b1;
    repeat (4) @(negedge clk);
    check(!clock_enable, "no step while line held low");
    #2 host_pull_low = 1'b0;
    edges = 0;
    while (!clock_enable && edges < 20) begin
      @(posedge clk);
      edges++;
      #1;
    end
    check(edges == 3, $sformatf("step latency %0d clocks", edges));
    @(posedge clk);
    #1;
    check(!clock_enable && capture, "capture follows the step");
    @(posedge clk);
    #1;
    check(captures == cap0 + 1, "one capture per step");
    readback(s);
    check(s.count == 16'(expect_count) && count == 16'(expect_count),
          $sformatf("step snapshot count %0d, expected %0d", s.count, expect_count));
    n_step++;
  endtask

  task automatic pulse_resume();
    @(negedge clk);
    #3 resume_line = 1'b1;
    repeat (3) @(negedge clk);
    #3 resume_line = 1'b0;
    n_resume++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    snapshot_t s;
    logic [15:0] lfsr_at_200;
    int caps;
    longint c0;

    lfsr_at_200 = 16'hACE1;
    for (int i = 0; i < 200; i++) lfsr_at_200 = lfsr_next(lfsr_at_200);

    ref_value[0] = 16'd100;
    ref_value[1] = lfsr_at_200;
    ref_value[2] = 16'd300;
    ref_value[3] = 16'd300;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. Running: line low.
    repeat (20) @(negedge clk);
    check(!event_line && !frozen, "line low while running");

    // 2. Freeze at count 100.
    wait_event_line(400, "condition 0");
    check(frozen && count == 16'd100, $sformatf("frozen at count %0d", count));
    check(ce_cycles == 100, $sformatf("no enabled cycle lost or added: %0d", ce_cycles));
    check(event_flags == 4'b0001, "flag of condition 0");
    check(captures == 1, "capture on freeze");
    readback(s);
    check(s.count == 16'd100 && s.flags == 4'b0001, "snapshot identifies condition 0");
    if (frozen && s.count == 16'd100) n_freeze++;
    if (captures == 1) n_capture_frozen++;
    repeat (10) @(negedge clk);
    check(count == 16'd100, "stays frozen");
    // The line went high because the emulator let go: that was no step.
    if (count == 16'd100 && ce_cycles == 100) n_release_ignored++;

    // 3. Five single steps.
    for (int k = 1; k <= 5; k++) host_step(100 + k);
    check(ce_cycles == 105, "five enabled cycles for five steps");

    // 4. Resume.
    pulse_resume();
    repeat (8) @(negedge clk);
    check(!frozen && !event_line && event_flags == '0, "running after resume");
    check(count > 16'd105, "circuit advances after resume");

    // 5. Condition on the LFSR.
    wait_event_line(400, "condition 1");
    check(frozen && count == 16'd200 && lfsr == lfsr_at_200, $sformatf("frozen at count %0d", count));
    readback(s);
    check(s.flags == 4'b0010 && s.lfsr == lfsr_at_200, "snapshot identifies condition 1");
    // Resume while condition 1 still matches the frozen state.
    pulse_resume();
    repeat (8) @(negedge clk);
    check(!frozen && count > 16'd200, "resume with condition still true runs on");
    if (!frozen && count > 16'd200) n_masked_resume++;

    // 6. Two conditions at once.
    wait_event_line(400, "conditions 2 and 3");
    check(count == 16'd300, $sformatf("frozen at count %0d", count));
    readback(s);
    check(s.flags == 4'b1100 && s.count == 16'd300, "snapshot shows both events");
    if (s.flags == 4'b1100) n_multi++;
    host_step(301);
    pulse_resume();
    repeat (8) @(negedge clk);
    check(!frozen && !event_line, "running after second resume");

    // 7. Snapshot mode.
    freeze_mode  = 1'b0;
    ref_value[0] = 16'd500;
    caps = captures;
    c0 = cycles - ce_cycles;
    wait_event_line(800, "snapshot event");
    repeat (20) @(negedge clk);
    check(!frozen && count > 16'd510, "no freeze in snapshot mode");
    check(cycles - ce_cycles == c0, "no cycle lost in snapshot mode");
    check(captures == caps + 1, "one snapshot capture");
    readback(s);
    check(s.count == 16'd501 && s.flags == 4'b0001, "snapshot one cycle after match");
    if (captures == caps + 1 && !frozen) n_snapshot++;
    pulse_resume();
    repeat (8) @(negedge clk);
    check(!event_line && event_flags == '0, "snapshot event erased by resume");

    $display("mechanisms: freeze=%0d step=%0d capture=%0d resume=%0d multi=%0d snapshot=%0d masked_resume=%0d release_ignored=%0d",
             n_freeze, n_step, n_capture_frozen, n_resume, n_multi, n_snapshot, n_masked_resume, n_release_ignored);
    check(n_freeze > 0, "freeze happened");
    check(n_step > 0, "step happened");
    check(n_capture_frozen > 0, "capture happened");
    check(n_resume > 0, "resume happened");
    check(n_multi > 0, "simultaneous events happened");
    check(n_snapshot > 0, "snapshot mode happened");
    check(n_masked_resume > 0, "resume with matching state happened");
    check(n_release_ignored > 0, "release of the line ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
