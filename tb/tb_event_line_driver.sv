// tb_event_line_driver: self-checking test of the event combiner and pad
// drive. Random held flags, hits and onsets on 4 and 7 events are applied;
// expected outputs are worked out by counting set bits in the testbench.
module tb_event_line_driver;
  int checks = 0, failures = 0;

  logic [3:0] ev4, hit4, on4;
  logic [6:0] ev7, hit7, on7;
  logic stop4, onset4, pull4, stop7, onset7, pull7;

  event_line_driver #(.N_EVENTS(4)) dut4 (.event_q(ev4), .hit(hit4), .onset_in(on4),
                                          .stop(stop4), .onset(onset4), .pad_pull_low(pull4));
  event_line_driver #(.N_EVENTS(7)) dut7 (.event_q(ev7), .hit(hit7), .onset_in(on7),
                                          .stop(stop7), .onset(onset7), .pad_pull_low(pull7));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      // Sparse vectors so that the all-zero case occurs often.
      ev4 = 4'($urandom) & 4'($urandom) & 4'($urandom);
      hit4 = 4'($urandom) & 4'($urandom) & 4'($urandom);
      on4 = 4'($urandom) & 4'($urandom);
      ev7 = 7'($urandom) & 7'($urandom) & 7'($urandom) & 7'($urandom);
      hit7 = 7'($urandom) & 7'($urandom) & 7'($urandom) & 7'($urandom);
      on7 = 7'($urandom) & 7'($urandom) & 7'($urandom);
      #1;
      check(pull4 == ($countones(ev4) == 0), "pull4");
      check(stop4 == ($countones(ev4) + $countones(hit4) > 0), "stop4");
      check(onset4 == ($countones(on4) > 0), "onset4");
      check(pull7 == ($countones(ev7) == 0), "pull7");
      check(stop7 == ($countones(ev7) + $countones(hit7) > 0), "stop7");
      check(onset7 == ($countones(on7) > 0), "onset7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
