// event_detector: holds one debug event until the host erases it.
//
// The condition comparator reports a match only while the watched state is
// present. The detector turns that into an event the host can find later:
// a match sets the event flag, which stays set until a resume pulse (from
// the resume-line edge detector) erases it. The flag is a plain flip-flop,
// so a readback of the captured state shows which condition fired.
//
// After a resume the condition is masked until the circuit under debug has
// advanced by one enabled clock cycle (advance = its clock enable). Without
// that mask a condition that is still true on the frozen state would stop
// the circuit again at once and resume would never move it.
//
// Interface:
//   cond     combinational match from the comparator
//   resume   one-cycle pulse, erases the event
//   advance  1 in a cycle where the circuit's flip-flops are enabled
//   hit      cond seen while unmasked (combinational, used to freeze at once)
//   onset    hit in a cycle where the flag is not yet set (a new event)
//   event_q  the held event flag
// Timing: event_q rises on the clock edge that ends the first cycle of hit.
// The source shows the detector only as a box fed by its condition and by
// the edge detector; holding, erasing and masking are this design's reading.
module event_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic cond,
  input  logic resume,
  input  logic advance,
  output logic hit,
  output logic onset,
  output logic event_q
);

  logic masked_q;

  always_comb begin
    hit   = cond & ~masked_q;
    onset = hit & ~event_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      event_q  <= 1'b0;
      masked_q <= 1'b0;
    end else if (resume) begin
      event_q  <= 1'b0;
      masked_q <= 1'b1;
    end else begin
      event_q  <= event_q | hit;
      if (advance) masked_q <= 1'b0;
    end
  end

endmodule
