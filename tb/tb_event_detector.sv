// tb_event_detector: self-checking test of the event holder.
// A directed sequence checks the rules one by one: a match sets the event,
// the event outlives the match, a resume pulse erases it, and a condition
// still true after the resume is ignored until the circuit has advanced one
// enabled cycle. Random stimulus is then compared cycle by cycle with a
// model kept in the testbench.
module tb_event_detector;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cond = 1'b0, resume = 1'b0, advance = 1'b1;
  logic hit, onset, event_q;
  bit   m_event = 1'b0, m_mask = 1'b0;

  always #5 clk = ~clk;

  event_detector dut (.clk, .rst_n, .cond, .resume, .advance, .hit, .onset, .event_q);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t", what, $time);
    end
  endtask

  task automatic compare_model();
    bit e_hit;
    e_hit = cond && !m_mask;
    check(hit == e_hit, "hit");
    check(onset == (e_hit && !m_event), "onset");
    check(event_q == m_event, "event_q");
  endtask

  // Model update for the clock edge that ends the current cycle.
  task automatic step_model();
    bit e_hit;
    e_hit = cond && !m_mask;
    if (resume) begin
      m_event = 1'b0;
      m_mask  = 1'b1;
    end else begin
      if (e_hit)   m_event = 1'b1;
      if (advance) m_mask  = 1'b0;
    end
  endtask

  task automatic cycle();
    #1 compare_model();
    @(posedge clk);
    step_model();
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    // Directed: set, hold, erase, mask.
    cond = 1'b1; advance = 1'b0;
    #1 check(hit && onset && !event_q, "first match");
    cycle();
    cond = 1'b0;
    #1 check(event_q && !hit, "event held after match ended");
    cycle();
    cond = 1'b1; resume = 1'b1;
    cycle();
    resume = 1'b0;
    #1 check(!event_q && !hit, "erased and masked after resume");
    cycle();
    #1 check(!event_q, "still masked while frozen");
    advance = 1'b1;
    cycle();
    #1 check(hit && onset, "unmasked after one enabled cycle");
    cycle();
    #1 check(event_q && hit && !onset, "no new onset while held");
    // Random.
    for (int n = 0; n < 3000; n++) begin
      cond    = ($urandom % 3) == 0;
      resume  = ($urandom % 7) == 0;
      advance = ($urandom % 2) == 0;
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
