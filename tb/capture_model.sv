// capture_model: behavioural model of the FPGA's state-capture primitive and
// of the configuration readback that follows it. Not synthesizable logic of
// this design: in the FPGA the primitive has only a capture request (cap)
// and a clock (clk_cap), and copies every flip-flop into configuration
// memory cells in one clock cycle. Here the flip-flop contents are passed
// in explicitly as state, and the host reads the copy one byte at a time
// (rb_addr selects the byte), as it would through the byte-wide
// configuration port.
module capture_model #(
  parameter int unsigned STATE_W = 64
) (
  input  logic               clk_cap,
  input  logic               cap,
  input  logic [STATE_W-1:0] state,
  input  logic [7:0]         rb_addr,
  output logic [7:0]         rb_data,
  output int                 captures
);
  localparam int unsigned BYTES = (STATE_W + 7) / 8;

  logic [BYTES*8-1:0] shadow = '0;

  initial captures = 0;

  always @(posedge clk_cap) begin
    if (cap) begin
      shadow   <= {{(BYTES*8-STATE_W){1'b0}}, state};
      captures <= captures + 1;
    end
  end

  always_comb begin
    rb_data = (int'(rb_addr) < BYTES) ? shadow[rb_addr*8 +: 8] : 8'h00;
  end
endmodule
