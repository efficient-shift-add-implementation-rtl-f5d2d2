// delay_line: the filter's tapped delay line of D flip-flops.
//
// DEPTH registers of W bits in a chain. At each rising clock edge taps[0]
// takes the input sample and taps[i] takes taps[i-1], so taps[i] holds the
// sample presented i+1 edges ago. With the default 4 x 5 bits this is the
// 20-flip-flop register file of the filter (registers x, x1, x2, x3).
// Interface: clk, reset (synchronous, active high, clears all taps), din in;
// taps out, valid right after the clock edge.
// The chain, its depth and width follow the reference design; the
// synchronous reset to zero is this implementation's choice.
module delay_line #(
  parameter int unsigned W     = 5,
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [W-1:0]              din,
  output logic [DEPTH-1:0][W-1:0]   taps
);

  always_ff @(posedge clk) begin
    if (reset) begin
      taps <= '0;
    end else begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
