// unshades_debug: run-time debug controller for a circuit emulated in an FPGA.
//
// The controller is inserted next to the circuit under debug. It lets a
// host computer stop that circuit on programmed conditions, step it one
// clock cycle at a time and take a snapshot of all its flip-flops after each
// step, while costing only two pins:
//   event line   open-collector, pulled up outside. The controller pulls it
//                low while the circuit runs and releases it when an event is
//                held. When frozen the host uses the same line to request
//                single steps: each low-then-high pulse gives one cycle.
//   resume line  a rising edge erases all events and lets the circuit run.
//
// Structure: N_EVENTS condition comparators watch WATCH_W bits each; an
// event detector per condition holds the event; the event line driver ORs
// the events onto the pad; the step state machine drives the clock enable
// of the circuit under debug and the CAP input of the FPGA's state-capture
// primitive (which is not part of this logic). The held event flags are
// brought out so that they can be captured with the user's registers and so
// identify which condition stopped the circuit.
//
// Ports:
//   freeze_mode     1: stop and stay frozen on an event; 0: snapshot only
//   watch[i]        signals watched by condition i
//   ref_value[i]    value condition i compares against (tie to constants)
//   event_line_in   level sensed on the event pad
//   event_pull_low  1 = drive the event pad to ground, 0 = release it
//   resume_line     level of the resume pad
//   clock_enable    clock enable of every frozen flip-flop of the circuit
//   capture         one-cycle request to capture the flip-flop state
//   frozen          1 while the circuit is held
//   event_flags     held event of each condition
//   step_state      state of the step machine (for observation)
// Timing: clock_enable falls in the cycle the matching state is present,
// so the circuit holds that state; capture is high in the same cycle. A
// rising resume edge takes effect SYNC_STAGES+1 cycles later; a rising
// event-line edge gives its step cycle SYNC_STAGES+1 cycles later.
//
// The source gives no number of conditions or watch width: the defaults of
// 4 conditions of 16 bits are this design's choice.
module unshades_debug
  import unshades_pkg::*;
#(
  parameter int unsigned N_EVENTS    = 4,
  parameter int unsigned WATCH_W     = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              freeze_mode,
  input  logic [N_EVENTS-1:0][WATCH_W-1:0]  watch,
  input  logic [N_EVENTS-1:0][WATCH_W-1:0]  ref_value,
  input  logic                              event_line_in,
  output logic                              event_pull_low,
  input  logic                              resume_line,
  output logic                              clock_enable,
  output logic                              capture,
  output logic                              frozen,
  output logic [N_EVENTS-1:0]               event_flags,
  output step_state_t                       step_state
);

  logic [N_EVENTS-1:0] cond, hit, onset_v, event_q;
  logic                resume_pulse;
  logic                line_level, line_rise;
  logic                stop, onset;

  for (genvar i = 0; i < N_EVENTS; i++) begin : g_event
    condition_comparator #(.WIDTH(WATCH_W)) u_cmp (
      .watch     (watch[i]),
      .ref_value (ref_value[i]),
      .match     (cond[i])
    );

    event_detector u_det (
      .clk     (clk),
      .rst_n   (rst_n),
      .cond    (cond[i]),
      .resume  (resume_pulse),
      .advance (clock_enable),
      .hit     (hit[i]),
      .onset   (onset_v[i]),
      .event_q (event_q[i])
    );
  end

  edge_detector #(.SYNC_STAGES(SYNC_STAGES), .RESET_LEVEL(1'b0)) u_resume_edge (
    .clk      (clk),
    .rst_n    (rst_n),
    .async_in (resume_line),
    .level    (),
    .rise     (resume_pulse)
  );

  // The step machine follows the synchronised event-line level to see the
  // host take the line low, and its rising edge to start a step.
  edge_detector #(.SYNC_STAGES(SYNC_STAGES), .RESET_LEVEL(1'b0)) u_line_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .async_in (event_line_in),
    .level    (line_level),
    .rise     (line_rise)
  );

  event_line_driver #(.N_EVENTS(N_EVENTS)) u_line_drv (
    .event_q      (event_q),
    .hit          (hit),
    .onset_in     (onset_v),
    .stop         (stop),
    .onset        (onset),
    .pad_pull_low (event_pull_low)
  );

  step_fsm u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .freeze_mode  (freeze_mode),
    .stop         (stop),
    .onset        (onset),
    .line_level   (line_level),
    .line_rise    (line_rise),
    .clock_enable (clock_enable),
    .capture      (capture),
    .frozen       (frozen),
    .state        (step_state)
  );

  assign event_flags = event_q;

endmodule
