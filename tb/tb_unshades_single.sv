// tb_unshades_single: the debug controller in its smallest form, one stop
// condition as in the basic step-by-step scheme, with an 8-bit watch on the
// low byte of a counter and three-stage synchronisers. The host makes 40
// single steps with random hold-low times and random release instants
// between clock edges, and checks for each one that the step cycle starts
// SYNC_STAGES+1 clock edges after the release, that the circuit advances by
// exactly one count and that the snapshot read back shows the new count.
// A resume then runs the counter until its low byte matches again (one
// full wrap of the byte later), where it must freeze once more.
module tb_unshades_single;
  import unshades_pkg::*;

  localparam int SYNC = 3;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [0:0][7:0] watch, ref_value;
  logic event_line, event_pull_low, host_pull_low = 1'b0;
  logic resume_line = 1'b0;
  logic clock_enable, capture, frozen;
  logic [0:0] event_flags;
  step_state_t step_state;
  logic [15:0] count, lfsr;
  logic [7:0]  rb_addr = '0, rb_data;
  int          captures;
  int          n_steps = 0, n_freeze = 0;

  always #5 clk = ~clk;

  assign event_line = ~(event_pull_low | host_pull_low);

  unshades_debug #(.N_EVENTS(1), .WATCH_W(8), .SYNC_STAGES(SYNC)) dut (
    .clk, .rst_n, .freeze_mode(1'b1), .watch, .ref_value,
    .event_line_in (event_line), .event_pull_low, .resume_line,
    .clock_enable, .capture, .frozen, .event_flags, .step_state
  );

  debug_target target (.clk, .rst_n, .ce(clock_enable), .count, .lfsr);

  capture_model #(.STATE_W(17)) cap_model (
    .clk_cap (clk), .cap(capture), .state({event_flags, count}),
    .rb_addr, .rb_data, .captures
  );

  assign watch[0]     = count[7:0];
  assign ref_value[0] = 8'h40;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask


  task automatic readback(output logic [15:0] c, output logic f);
    rb_addr = 8'd0; #1 c[7:0]  = rb_data;
    rb_addr = 8'd1; #1 c[15:8] = rb_data;
    rb_addr = 8'd2; #1 f       = rb_data[0];
  endtask

  task automatic wait_freeze(logic [15:0] at);
    logic [15:0] c;
    logic        f;
    int          n = 0;
    while (!event_line && n < 5000) begin
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
    check(frozen && count == at, $sformatf("frozen at %0d, expected %0d", count, at));
    readback(c, f);
    check(c == at && f, "snapshot on freeze");
    if (frozen && c == at) n_freeze++;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] c, expect_count;
    logic        f;
    int          edges, cap0;

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait_freeze(16'h0040);
    expect_count = 16'h0040;

    for (int k = 0; k < 40; k++) begin
      cap0 = captures;
      @(negedge clk);
      #($urandom_range(1, 4)) host_pull_low = 1'b1;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      #($urandom_range(1, 4)) host_pull_low = 1'b0;
      edges = 0;
      while (!clock_enable && edges < 30) begin
        @(posedge clk);
        edges++;
        #1;
      end
      check(edges == SYNC + 1, $sformatf("step latency %0d", edges));
      repeat (2) @(posedge clk);
      #1;
      expect_count++;
      check(captures == cap0 + 1, "one capture per step");
      readback(c, f);
      check(c == expect_count && count == expect_count,
            $sformatf("after step %0d: count %0d snapshot %0d expected %0d", k, count, c, expect_count));
      check(f && frozen, "still frozen with the event held");
      n_steps++;
    end

    // Resume; the next match of the low byte is one wrap later.
    @(negedge clk);
    #2 resume_line = 1'b1;
    repeat (SYNC + 3) @(negedge clk);
    check(!frozen && !event_line, "running after resume");
    #2 resume_line = 1'b0;
    wait_freeze(16'h0140);

    check(n_steps == 40 && n_freeze == 2, $sformatf("steps %0d freezes %0d", n_steps, n_freeze));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
