// unshades_pkg: types shared by the run-time debug controller.
//
// The step-by-step controller is a small state machine that sits between
// the open-collector event line and the clock enable of the circuit under
// debug. Its state encoding is an enum so that a waveform viewer and the
// capture readback show state names. The encoding itself is this design's
// own choice; the source describes only what the machine does.
package unshades_pkg;

  typedef enum logic [2:0] {
    ST_RUN      = 3'd0,  // circuit running, clock enable follows the events
    ST_FREEZE   = 3'd6,  // first frozen cycle, capture of the stopped state
    ST_RELEASE  = 3'd1,  // frozen, waiting for the event line to float high
    ST_HELD     = 3'd2,  // frozen, line high, waiting for the host to pull it low
    ST_LOW      = 3'd3,  // frozen, host holds the line low
    ST_STEP     = 3'd4,  // one enabled clock cycle after the line rose
    ST_CAPTURE  = 3'd5   // frozen again, capture of the new state
  } step_state_t;

endpackage
