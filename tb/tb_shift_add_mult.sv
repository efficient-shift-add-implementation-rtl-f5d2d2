// tb_shift_add_mult: checks the multiplierless constant multiplier.
//
// A set of constants (the filter's 1, 3, 4 and others with long runs of
// ones, 0, and 45, where CSD is not optimal) is instantiated in both
// recodings and for unsigned and signed samples. Every 5-bit sample is
// applied and each product is compared with x * c modulo 2^9, x read as
// unsigned or two's complement.
module tb_shift_add_mult;
  import fir_pkg::*;

  localparam int NC = 10;
  localparam int CS [NC] = '{0, 1, 3, 4, 7, 11, 15, 23, 45, 31};

  int checks = 0;
  int failures = 0;

  logic [4:0] x;
  logic [8:0] y_bin [NC];
  logic [8:0] y_csd [NC];
  logic [8:0] y_sgn [NC];

  for (genvar i = 0; i < NC; i++) begin : g_c
    shift_add_mult #(.COEFF(CS[i]), .RECODE(RECODE_BINARY)) u_bin (.x(x), .y(y_bin[i]));
    shift_add_mult #(.COEFF(CS[i]), .RECODE(RECODE_CSD))    u_csd (.x(x), .y(y_csd[i]));
    shift_add_mult #(.COEFF(CS[i]), .RECODE(RECODE_CSD), .SIGNED_IN(1'b1)) u_sgn (.x(x), .y(y_sgn[i]));
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int c, int xv, logic [8:0] got, int expect_v);
    checks++;
    if (got != 9'(expect_v)) begin
      failures++;
      $display("FAIL %s c=%0d x=%0d got %0d expected %0d", what, c, xv, got, 9'(expect_v));
    end
  endtask

  initial begin
    // Recoding sanity: the CSD form of 3 is 4 - 1, of 45 is 64 - 16 - 4 + 1.
    checks++;
    if (recode_digit(3, 0, RECODE_CSD) != -1 || recode_digit(3, 1, RECODE_CSD) != 0 ||
        recode_digit(3, 2, RECODE_CSD) != 1) begin
      failures++;
      $display("FAIL CSD digits of 3");
    end
    checks++;
    if (nonzero_digits(45, 10, RECODE_CSD) != 4 || nonzero_digits(45, 10, RECODE_BINARY) != 4 ||
        nonzero_digits(15, 10, RECODE_CSD) != 2 || nonzero_digits(15, 10, RECODE_BINARY) != 4) begin
      failures++;
      $display("FAIL nonzero digit counts");
    end
    for (int xv = 0; xv < 32; xv++) begin
      x = 5'(xv);
      #1;
      for (int i = 0; i < NC; i++) begin
        check("binary", CS[i], xv, y_bin[i], xv * CS[i]);
        check("csd", CS[i], xv, y_csd[i], xv * CS[i]);
        check("signed", CS[i], xv, y_sgn[i], ((xv >= 16) ? xv - 32 : xv) * CS[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
