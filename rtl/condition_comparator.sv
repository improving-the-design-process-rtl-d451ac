// condition_comparator: one run-time debug condition.
//
// Each debug event watches a set of wires or registers of the circuit under
// debug and fires when they hold a programmed value. The source calls the
// run-time condition "a simple comparator" and inserts one comparator per
// event; this block is that comparator: an equality test of WIDTH watched
// bits against a reference word. The match output is combinational, so the
// controller can deassert the clock enable in the same cycle the watched
// state appears and the circuit freezes exactly on the matching state.
//
// Interface: watch (the observed bits), ref_value (the programmed value,
// normally a constant tied at insertion time), match (1 while equal).
// The width default of 16 is this design's choice; the source gives none.
module condition_comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] watch,
  input  logic [WIDTH-1:0] ref_value,
  output logic             match
);

  always_comb begin
    match = (watch == ref_value);
  end

endmodule
