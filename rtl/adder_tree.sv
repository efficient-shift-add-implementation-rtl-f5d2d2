// adder_tree: binary tree of Sklansky adders that sums N values.
//
// The inputs are padded with zeros to the next power of two P and added in
// pairs, level by level, for log2(P) levels; a level of n values uses n/2
// adders. With the default N = 4 the first level forms add0 = v0 + v1 and
// add1 = v2 + v3 and the second level forms add0 + add1. All values are W
// bits and every sum is taken modulo 2^W.
// Interface: vals (N x W) in, sum (W) out. Purely combinational.
// The binary tree of adders follows the reference design; carrying every
// node at the full result width (instead of 8-bit adders whose carry-out
// forms the 9th bit) is this implementation's choice, exact for any
// coefficient set.
module adder_tree #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 9
) (
  input  logic [N-1:0][W-1:0] vals,
  output logic [W-1:0]        sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : lvl
    logic [(P >> l)-1:0][W-1:0] v;
    if (l == 0) begin : g_leaves
      always_comb begin
        v = '0;
        for (int i = 0; i < int'(N); i++) v[i] = vals[i];
      end
    end else begin : g_nodes
      for (genvar i = 0; i < (P >> l); i++) begin : g_node
        logic unused_cout;
        sklansky_adder #(.W(W)) u_add (
          .a    (lvl[l-1].v[2*i]),
          .b    (lvl[l-1].v[2*i+1]),
          .cin  (1'b0),
          .sum  (v[i]),
          .cout (unused_cout)
        );
      end
    end
  end

  assign sum = lvl[LEVELS].v[0];

endmodule
