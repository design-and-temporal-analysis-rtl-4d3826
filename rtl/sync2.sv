// sync2: two-flip-flop synchroniser for a bundle of asynchronous inputs.
//
// The PWM signals arrive from the motor control unit on its own clock, so
// each bit passes two flops before any edge detection. Latency is two clock
// cycles; the flops reset to zero. A bus of independent single-bit signals
// only: bits are not kept coherent with each other. The synchroniser is this
// design's addition; the source design does not discuss clock crossing.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
