// edge_detector: synchroniser and rising-edge detector for an external line.
//
// The resume line and the shared event line arrive from the host without a
// relation to the emulator clock. The line is first passed through a chain
// of SYNC_STAGES flip-flops, then compared with its value one cycle earlier;
// a low-to-high change gives a pulse of exactly one clock cycle.
//
// Interface: async_in (pad level), level (synchronised level), rise (one
// cycle pulse per rising edge). Latency from a pad edge to the pulse is
// SYNC_STAGES clock cycles. The source names an edge detector on the resume
// line; that it reacts to the rising edge, and the two-stage synchroniser,
// are this design's choices. The flip-flops reset to RESET_LEVEL so that a
// line that is already at that level after reset gives no pulse.
module edge_detector #(
  parameter int unsigned SYNC_STAGES = 2,
  parameter bit          RESET_LEVEL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic level,
  output logic rise
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= {SYNC_STAGES{RESET_LEVEL}};
      last_q <= RESET_LEVEL;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], async_in};
      last_q <= sync_q[SYNC_STAGES-1];
    end
  end

  always_comb begin
    level = sync_q[SYNC_STAGES-1];
    rise  = level & ~last_q;
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("edge_detector: SYNC_STAGES must be at least 2");
  end

endmodule
