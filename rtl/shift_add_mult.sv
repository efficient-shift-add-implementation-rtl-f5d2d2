// shift_add_mult: multiplierless multiplication of a sample by a fixed,
// non-negative constant COEFF (a "multiplier block").
//
// The constant is recoded at elaboration time into digits d_k in {-1,0,+1}
// (plain binary or canonical signed digit, see fir_pkg::recode_e), and the
// product is the sum of the shifted samples d_k * (x << k). The terms are
// accumulated from the most significant nonzero digit (always +1) down to
// bit 0 through a chain of Sklansky adders; a -1 digit subtracts by adding
// the inverted term with carry-in 1. A constant with n nonzero digits costs
// n-1 adders and no multiplier: 1 and 4 are pure wiring, 3 is one
// add/subtract (binary: 2x + x, CSD: 4x - x).
// Interface: x (IN_W bits, zero- or sign-extended by SIGNED_IN) in, y
// (OUT_W bits, the product modulo 2^OUT_W) out. Purely combinational.
// Shift-and-add multiplication with binary or CSD recoding follows the
// reference design; the MSB-first chain order and the extension choice are
// this implementation's.
module shift_add_mult #(
  parameter int unsigned IN_W      = 5,
  parameter int unsigned OUT_W     = 9,
  parameter int unsigned COEFF     = 3,
  parameter fir_pkg::recode_e RECODE = fir_pkg::RECODE_CSD,
  parameter bit          SIGNED_IN = 1'b0
) (
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  // CSD may need one digit above the constant's top bit; digits at or above
  // OUT_W only add multiples of 2^OUT_W and drop out.
  localparam int ND  = OUT_W + 1;
  localparam int TOP = fir_pkg::top_digit(int'(COEFF), ND, RECODE);

  logic [OUT_W-1:0] xe;   // sample extended to the product width

  if (OUT_W > IN_W) begin : g_ext
    assign xe = {{(OUT_W - IN_W){SIGNED_IN & x[IN_W-1]}}, x};
  end else begin : g_trunc
    assign xe = x[OUT_W-1:0];
  end

  // st[k].acc holds the sum of the terms of digits k and above.
  for (genvar k = ND - 1; k >= 0; k--) begin : st
    localparam int D = fir_pkg::recode_digit(int'(COEFF), k, RECODE);
    logic [OUT_W-1:0] acc;
    if (D == 0 || k > TOP) begin : g_zero
      if (k == ND - 1) begin : g_first
        assign acc = '0;
      end else begin : g_hold
        assign acc = st[k+1].acc;
      end
    end else if (k == TOP) begin : g_lead
      assign acc = (k < OUT_W) ? (xe << k) : '0;
    end else begin : g_add
      logic [OUT_W-1:0] term;
      logic unused_cout;
      assign term = (k < OUT_W) ? (xe << k) : '0;
      sklansky_adder #(.W(OUT_W)) u_add (
        .a    (st[k+1].acc),
        .b    ((D > 0) ? term : ~term),
        .cin  (D < 0),
        .sum  (acc),
        .cout (unused_cout)
      );
    end
  end

  assign y = st[0].acc;

endmodule
