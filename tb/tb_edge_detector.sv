// tb_edge_detector: self-checking test of the synchronising edge detector.
// Two instances (2 and 3 synchroniser stages) see the same line. For each
// rising edge the testbench counts the clock edges until the pulse and
// expects exactly SYNC_STAGES, a pulse one cycle wide, and no pulse on a
// falling edge. The synchronised level is checked after it has settled.
module tb_edge_detector;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, line = 1'b0;
  logic lvl2, rise2, lvl3, rise3;
  int   pulses2 = 0, pulses3 = 0;

  always #5 clk = ~clk;

  edge_detector #(.SYNC_STAGES(2)) dut2 (.clk, .rst_n, .async_in(line), .level(lvl2), .rise(rise2));
  edge_detector #(.SYNC_STAGES(3)) dut3 (.clk, .rst_n, .async_in(line), .level(lvl3), .rise(rise3));

  always @(negedge clk) begin
    if (rise2) pulses2++;
    if (rise3) pulses3++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask

  // Measure the number of clock edges from a line change to each pulse.
  task automatic edge_test(logic value);
    int t2 = -1, t3 = -1;
    int p2, p3;
    @(negedge clk);
    #1;
    p2 = pulses2; p3 = pulses3;
    line = value;
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk);
      if (rise2 && t2 < 0) t2 = k;
      if (rise3 && t3 < 0) t3 = k;
    end
    if (value) begin
      check(t2 == 2, $sformatf("2-stage latency %0d", t2));
      check(t3 == 3, $sformatf("3-stage latency %0d", t3));
      check(pulses2 - p2 == 1, "2-stage pulse width");
      check(pulses3 - p3 == 1, "3-stage pulse width");
    end else begin
      check(t2 < 0 && t3 < 0, "pulse on falling edge");
    end
    check(lvl2 == value && lvl3 == value, "synchronised level");
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    check(!rise2 && !rise3 && !lvl2 && !lvl3, "reset values");
    rst_n = 1'b1;
    repeat (10) begin
      edge_test(1'b1);
      edge_test(1'b0);
    end
    // A one-cycle glitch-free pulse on the line still gives one pulse.
    @(negedge clk); line = 1'b1;
    @(negedge clk); line = 1'b0;
    repeat (6) @(negedge clk);
    check(pulses2 == 11 && pulses3 == 11, $sformatf("pulse count %0d %0d", pulses2, pulses3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
