// tb_sklansky_adder: exhaustive check of the Sklansky adder.
//
// The default 8-bit adder gets every (a, b, cin) combination; a 5-bit and a
// 13-bit instance (widths that are not powers of two) get every combination
// and 20000 random ones. Each sum and carry is compared with the integer sum
// a + b + cin.
module tb_sklansky_adder;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [4:0]  a5, b5, s5;
  logic        c5, co5;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  sklansky_adder dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  sklansky_adder #(.W(5))  dut5  (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));
  sklansky_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); c8 = c[0];
          #1;
          checks++;
          if ({co8, s8} != 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d got %0d", a, b, c, {co8, s8});
          end
        end
      end
    end
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(a); b5 = 5'(b); c5 = c[0];
          #1;
          checks++;
          if ({co5, s5} != 6'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=5 %0d+%0d+%0d got %0d", a, b, c, {co5, s5});
          end
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      int ra, rb, rc;
      ra = int'($urandom_range(8191));
      rb = int'($urandom_range(8191));
      rc = int'($urandom_range(1));
      if (n == 0) begin ra = 8191; rb = 0; rc = 1; end   // longest carry ripple
      a13 = 13'(ra); b13 = 13'(rb); c13 = rc[0];
      #1;
      checks++;
      if ({co13, s13} != 14'(ra + rb + rc)) begin
        failures++;
        if (failures < 10) $display("FAIL W=13 %0d+%0d+%0d got %0d", ra, rb, rc, {co13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
