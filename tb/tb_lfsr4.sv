// tb_lfsr4: checks the 4-stage LFSR against a software model of the
// feedback q <= {q[2:0], q[3] ^ q[2]}: the reset value, the state after
// every clock, that all 15 nonzero states appear once per period and that
// the sequence returns to the seed after 15 clocks. An asynchronous reset is
// also applied in the middle of a clock period.
module tb_lfsr4;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic reset;
  logic [3:0] q;
  logic [3:0] model;
  bit seen [16];

  lfsr4 dut (.clk(clk), .reset(reset), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    #12;
    reset = 1'b0;
    model = 4'b0001;
    checks++;
    if (q != model) begin failures++; $display("FAIL reset value %b", q); end
    for (int n = 0; n < 45; n++) begin
      @(posedge clk);
      model = {model[2:0], model[3] ^ model[2]};
      #1;
      checks++;
      if (q != model) begin failures++; $display("FAIL n=%0d q=%b expected %b", n, q, model); end
      if (n < 15) seen[q] = 1'b1;
      if (n == 14) begin
        checks++;
        if (q != 4'b0001) begin failures++; $display("FAIL period: q=%b after 15 clocks", q); end
      end
    end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (seen[s] != (s != 0)) begin failures++; $display("FAIL state %0d seen=%0b", s, seen[s]); end
    end
    // Asynchronous reset between clock edges.
    @(negedge clk);
    reset = 1'b1;
    #1;
    checks++;
    if (q != 4'b0001) begin failures++; $display("FAIL async reset q=%b", q); end
    reset = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
