// fir_pkg: sizes, coefficients and shared types of the shift-add FIR filter.
//
// The filter is a 4-tap direct-form FIR on 5-bit samples with a 9-bit result.
// Those three numbers and the coefficient set h = {1, 3, 4, 3} (h0 first) are
// the ones of the reference design; the recoding enum and the choice of
// unsigned samples by default are this implementation's own.
package fir_pkg;

  // Sample width (input port data1(4:0)).
  parameter int unsigned DATA_W = 5;
  // Result width (output port finalout(8:0)); all partial products and
  // adder-tree values are carried at this width.
  parameter int unsigned OUT_W  = 9;
  // Number of taps (registers x, x1, x2, x3).
  parameter int unsigned NTAPS  = 4;
  // Width in which a coefficient is stored (the coefficients are shown as
  // 5-bit values).
  parameter int unsigned COEF_W = 5;

  typedef logic [NTAPS-1:0][COEF_W-1:0] coef_vec_t;

  // Tap weights, element i multiplies the sample delayed by i clocks.
  parameter coef_vec_t COEFFS = {5'd3, 5'd4, 5'd3, 5'd1};

  // How a constant is split into shifted terms.
  //   RECODE_BINARY: one term per '1' bit of the constant (all additions).
  //   RECODE_CSD:    canonical signed digit, no two adjacent nonzero digits,
  //                  terms may be subtracted.
  typedef enum logic {RECODE_BINARY = 1'b0, RECODE_CSD = 1'b1} recode_e;

  // Digit k (-1, 0 or +1) of the non-negative constant c under the given
  // recoding. For CSD the digit is chosen from c mod 4 at each odd step:
  // 1 -> +1, 3 -> -1, which never leaves two adjacent nonzero digits.
  function automatic int recode_digit(int c, int k, recode_e mode);
    int n;
    int d;
    n = c;
    d = 0;
    for (int i = 0; i <= k; i++) begin
      if (mode == RECODE_BINARY) begin
        d = n % 2;
      end else if (n % 2 == 1) begin
        d = (n % 4 == 1) ? 1 : -1;
      end else begin
        d = 0;
      end
      n = (n - d) / 2;
    end
    return d;
  endfunction

  // Index of the most significant nonzero digit of c, -1 if c is 0.
  function automatic int top_digit(int c, int ndig, recode_e mode);
    int t;
    t = -1;
    for (int k = 0; k < ndig; k++) begin
      if (recode_digit(c, k, mode) != 0) t = k;
    end
    return t;
  endfunction

  // Number of nonzero digits of c, i.e. the number of shifted terms.
  function automatic int nonzero_digits(int c, int ndig, recode_e mode);
    int cnt;
    cnt = 0;
    for (int k = 0; k < ndig; k++) begin
      if (recode_digit(c, k, mode) != 0) cnt++;
    end
    return cnt;
  endfunction

endpackage
