// lfsr4: 4-stage linear feedback shift register with parallel output.
//
// The register q shifts up by one place at every rising edge of clk and
// takes into q[0] the feedback bit, the XOR of the stages selected by TAPS.
// The default TAPS = 4'b1100 (stages 4 and 3, polynomial x^4 + x^3 + 1) is
// maximal: from any nonzero seed q runs through all 15 nonzero states before
// it repeats. All four stages are the output, in parallel.
// Interface: clk (in this design the gated clock), reset (asynchronous,
// active high, loads SEED, so that it works while the clock is gated off);
// q out, changing just after the rising edge.
// A 4-stage LFSR with XOR feedback and 4-bit parallel output follows the
// reference design; the polynomial, seed and reset are this
// implementation's choices.
module lfsr4 #(
  parameter int unsigned W    = 4,
  parameter logic [W-1:0] TAPS = 4'b1100,
  parameter logic [W-1:0] SEED = 4'b0001
) (
  input  logic         clk,
  input  logic         reset,
  output logic [W-1:0] q
);

  logic fb;

  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q <= SEED;
    end else begin
      q <= {q[W-2:0], fb};
    end
  end

endmodule
