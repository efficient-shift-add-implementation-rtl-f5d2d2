// sklansky_adder: W-bit parallel-prefix adder with the Sklansky
// (divide-and-conquer) carry tree.
//
// The addition runs in three stages:
//   1. pre-calculation of the bit generate g = a & b and propagate p = a ^ b
//      terms (the carry-in is folded into the group generate of bit 0);
//   2. the carries, by a prefix tree of ceil(log2 W) levels: at level l every
//      bit in the upper half of each 2^l-bit block combines its group (G, P)
//      with the group that ends at the top bit of the lower half. Blocks of
//      2, 4, 8 ... bits are thus built by abutting two smaller adders, and the
//      fan-out of the lower-half top bit doubles at each level;
//   3. a simple sum stage, sum = p ^ carry.
// Interface: a, b, cin in; sum and cout out. Purely combinational, no clock.
// The three-stage structure, the Sklansky tree and the 8-bit default width
// follow the reference design; the carry-in port is this implementation's
// addition so that the same adder also subtracts (a + ~b + 1).
module sklansky_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 0;

  logic [W-1:0] p0;   // bit propagate
  logic [W-1:0] g0;   // bit generate
  logic [W-1:0] c;    // carry into each bit

  // Stage 1: P, G pre-calculation.
  assign p0 = a ^ b;
  assign g0 = a & b;

  // Stage 2: Sklansky prefix levels. lvl[l].g[i] is the generate of the
  // group running from bit i down to the start of its 2^l-aligned block
  // (down to bit 0 and the carry-in once l = L).
  for (genvar l = 0; l <= L; l++) begin : lvl
    logic [W-1:0] g;
    logic [W-1:0] p;
    if (l == 0) begin : g_init
      always_comb begin
        g    = g0;
        p    = p0;
        g[0] = g0[0] | (p0[0] & cin);
      end
    end else begin : g_level
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (((i >> (l - 1)) & 1) == 1) begin : g_merge
          // Top bit of the lower half of this bit's 2^l block.
          localparam int unsigned J = ((i >> (l - 1)) << (l - 1)) - 1;
          assign g[i] = lvl[l-1].g[i] | (lvl[l-1].p[i] & lvl[l-1].g[J]);
          assign p[i] = lvl[l-1].p[i] & lvl[l-1].p[J];
        end else begin : g_pass
          assign g[i] = lvl[l-1].g[i];
          assign p[i] = lvl[l-1].p[i];
        end
      end
    end
  end

  // Stage 3: sum.
  always_comb begin
    c[0] = cin;
    for (int i = 1; i < W; i++) c[i] = lvl[L].g[i-1];
  end

  assign sum  = p0 ^ c;
  assign cout = lvl[L].g[W-1];

endmodule
