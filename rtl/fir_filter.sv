// fir_filter: 4-tap direct-form FIR filter built without multipliers.
//
//   finalout = h0*x + h1*x1 + h2*x2 + h3*x3      (mod 2^OUT_W)
//
// where x is the sample data1 taken at the last rising clock edge and x1..x3
// the three before it (delay_line). Each product is a shift_add_mult block
// (shifts plus Sklansky add/subtracts, no multiplier) and the four products
// are summed by a binary adder_tree of Sklansky adders. With the default
// coefficients {1, 3, 4, 3} the products need two adders (the two x3 taps)
// and the tree three.
// Interface: clk, reset (synchronous, active high) and data1 in; finalout
// out. Timing: one sample per clock; finalout is combinational from the
// delay line, so a sample taken at edge n enters finalout right after edge
// n (weight h0) and leaves it after edge n+4.
// The widths, tap count, coefficients, the register chain, the shift-add
// products and the adder tree follow the reference design; the recoding
// default (CSD), unsigned samples and the synchronous reset are this
// implementation's choices.
module fir_filter
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W_P  = DATA_W,
  parameter int unsigned OUT_W_P   = OUT_W,
  parameter coef_vec_t   H         = COEFFS,
  parameter recode_e     RECODE    = RECODE_CSD,
  parameter bit          SIGNED_IN = 1'b0
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [DATA_W_P-1:0] data1,
  output logic [OUT_W_P-1:0]  finalout
);

  logic [NTAPS-1:0][DATA_W_P-1:0] x;     // x, x1, x2, x3
  logic [NTAPS-1:0][OUT_W_P-1:0]  mul;   // mul0 .. mul3

  delay_line #(.W(DATA_W_P), .DEPTH(NTAPS)) u_delay (
    .clk   (clk),
    .reset (reset),
    .din   (data1),
    .taps  (x)
  );

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    shift_add_mult #(
      .IN_W      (DATA_W_P),
      .OUT_W     (OUT_W_P),
      .COEFF     (int'(H[i])),
      .RECODE    (RECODE),
      .SIGNED_IN (SIGNED_IN)
    ) u_mul (
      .x (x[i]),
      .y (mul[i])
    );
  end

  adder_tree #(.N(NTAPS), .W(OUT_W_P)) u_tree (
    .vals (mul),
    .sum  (finalout)
  );

endmodule
