// step_fsm: freeze and single-step controller for the circuit under debug.
//
// The circuit under debug is never stopped by gating its clock; instead
// every flip-flop that is to be frozen gets this block's clock_enable. The
// machine works as follows.
//   * Running (ST_RUN): clock_enable is 1 until the combined stop condition
//     appears. In freeze mode it drops in that same cycle, so the circuit
//     holds the state that matched.
//   * ST_FREEZE: the first frozen cycle. capture is raised here, with the
//     enable deasserted, so the snapshot holds the matching state and also
//     the event flags that were set on the freezing clock edge.
//   * Frozen: the event line is shared with the host. The machine first
//     waits until the line has floated high (ST_RELEASE), then for the host
//     to pull it low (ST_HELD -> ST_LOW) and release it again. On that
//     rising edge it grants exactly one enabled cycle (ST_STEP) and in the
//     next cycle, with the enable low again, raises capture (ST_CAPTURE).
//     If the host already holds the line low in that capture cycle the
//     machine goes straight to ST_LOW, so no request is lost.
//   * When the stop condition goes away (the host pulsed the resume line
//     and the events were erased) the machine returns to ST_RUN.
//   * In snapshot mode (freeze_mode = 0) the circuit is never frozen: one
//     cycle after each new event capture is raised for one cycle, so the
//     snapshot holds the event flags and the state one cycle after the
//     match, and the circuit runs on.
//
// Interface: stop, onset from the event combiner; line_level is the
// synchronised level of the event line and line_rise a one-cycle pulse
// on its rising edge; clock_enable goes to the frozen flip-flops; capture is
// the CAP input of the vendor state-capture primitive; frozen is 1 whenever
// the machine is not in ST_RUN. clock_enable is combinational from stop in
// ST_RUN so that the freeze takes effect with no lost cycle.
//
// From the source: the enable-based freeze, one enabled cycle per rising
// edge of the external line, capture when the enable is deasserted and
// again one cycle after each step, and the choice between staying frozen and
// running on after a snapshot. This design's own choices: the state
// encoding, the wait for the line to float high before steps are accepted,
// the capture one cycle after a snapshot event, and the mode input that
// selects freeze or snapshot.
module step_fsm
  import unshades_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        freeze_mode,
  input  logic        stop,
  input  logic        onset,
  input  logic        line_level,
  input  logic        line_rise,
  output logic        clock_enable,
  output logic        capture,
  output logic        frozen,
  output step_state_t state
);

  step_state_t state_q, state_d;
  logic        stop_eff;
  logic        snap_q;

  always_comb begin
    stop_eff     = stop & freeze_mode;
    state_d      = state_q;
    clock_enable = 1'b0;
    capture      = 1'b0;
    unique case (state_q)
      ST_RUN: begin
        clock_enable = ~stop_eff;
        capture      = snap_q;
        if (stop_eff) state_d = ST_FREEZE;
      end
      ST_FREEZE: begin
        capture = 1'b1;
        state_d = stop_eff ? ST_RELEASE : ST_RUN;
      end
      ST_RELEASE: begin
        if (!stop_eff)       state_d = ST_RUN;
        else if (line_level) state_d = ST_HELD;
      end
      ST_HELD: begin
        if (!stop_eff)        state_d = ST_RUN;
        else if (!line_level) state_d = ST_LOW;
      end
      ST_LOW: begin
        if (!stop_eff)      state_d = ST_RUN;
        else if (line_rise) state_d = ST_STEP;
      end
      ST_STEP: begin
        clock_enable = 1'b1;
        state_d      = ST_CAPTURE;
      end
      ST_CAPTURE: begin
        capture = 1'b1;
        if (!stop_eff)       state_d = ST_RUN;
        else if (line_level) state_d = ST_HELD;
        else                 state_d = ST_LOW;
      end
      default: state_d = ST_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_RUN;
      snap_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      snap_q  <= ~freeze_mode & onset;
    end
  end

  always_comb begin
    frozen = (state_q != ST_RUN);
    state  = state_q;
  end

  // A step is exactly one enabled cycle followed by a capture cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state_q == ST_STEP |=> state_q == ST_CAPTURE && !clock_enable);
  // While frozen and not stepping the circuit must not advance.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q != ST_RUN && state_q != ST_STEP) |-> !clock_enable);

endmodule
