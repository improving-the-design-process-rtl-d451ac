// debug_target: a small circuit under debug for the end-to-end test. It
// holds a 16-bit counter and a 16-bit Fibonacci LFSR (taps 16,14,13,11).
// Every flip-flop is enabled by ce, as the debug flow requires of each
// flip-flop that is to be frozen.
module debug_target (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  output logic [15:0] count,
  output logic [15:0] lfsr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      lfsr  <= 16'hACE1;
    end else if (ce) begin
      count <= count + 16'd1;
      lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    end
  end
endmodule
