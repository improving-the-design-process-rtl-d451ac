// event_line_driver: gathers all debug events onto the shared event line.
//
// Every programmed event is OR-ed onto one open-collector pad. While no
// event is held the emulator pulls the pad low, which tells the host that
// the circuit is running. When any event flag is set the driver lets go and
// the external pull-up takes the line high, where the host can see it and
// then use it for step-by-step control.
//
// Besides the pad drive, this block forms the three combined signals the
// controller needs from the N detectors:
//   stop       OR of held flags and of conditions hitting now; the clock
//              enable drops on it in the same cycle
//   onset      OR of new events, used to trigger a capture in snapshot mode
//   pad_pull_low  1 = drive the pad to ground, 0 = release it; it is the
//              inverse of the OR of the held flags
// All outputs are combinational. The pad itself, with its pull-up, sits
// outside the logic; the port pad_pull_low is the enable of its driver.
module event_line_driver #(
  parameter int unsigned N_EVENTS = 4
) (
  input  logic [N_EVENTS-1:0] event_q,
  input  logic [N_EVENTS-1:0] hit,
  input  logic [N_EVENTS-1:0] onset_in,
  output logic                stop,
  output logic                onset,
  output logic                pad_pull_low
);

  always_comb begin
    stop         = |(event_q | hit);
    onset        = |onset_in;
    pad_pull_low = ~(|event_q);
  end

endmodule
