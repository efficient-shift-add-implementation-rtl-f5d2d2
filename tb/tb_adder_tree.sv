// tb_adder_tree: checks the Sklansky adder tree for 4 inputs (the filter's
// case), 3 inputs (zero padding) and 8 inputs, each with random values and
// with all inputs at their maximum, against the integer sum modulo 2^9.
module tb_adder_tree;

  int checks = 0;
  int failures = 0;

  logic [3:0][8:0] v4;
  logic [2:0][8:0] v3;
  logic [7:0][8:0] v8;
  logic [8:0] s4, s3, s8;

  adder_tree dut4 (.vals(v4), .sum(s4));
  adder_tree #(.N(3)) dut3 (.vals(v3), .sum(s3));
  adder_tree #(.N(8)) dut8 (.vals(v8), .sum(s8));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e4, e3, e8;
      e4 = 0; e3 = 0; e8 = 0;
      for (int i = 0; i < 8; i++) begin
        logic [8:0] r;
        r = (n == 0) ? 9'h1ff : 9'($urandom_range(511));
        v8[i] = r;
        e8 += int'(r);
        if (i < 4) begin v4[i] = r; e4 += int'(r); end
        if (i < 3) begin v3[i] = r; e3 += int'(r); end
      end
      #1;
      checks += 3;
      if (s4 != 9'(e4)) begin failures++; $display("FAIL N=4 got %0d expected %0d", s4, 9'(e4)); end
      if (s3 != 9'(e3)) begin failures++; $display("FAIL N=3 got %0d expected %0d", s3, 9'(e3)); end
      if (s8 != 9'(e8)) begin failures++; $display("FAIL N=8 got %0d expected %0d", s8, 9'(e8)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
