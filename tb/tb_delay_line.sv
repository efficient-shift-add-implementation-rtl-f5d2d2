// tb_delay_line: checks the tapped register chain against a software
// history of the samples: after each clock edge tap i must hold the sample
// applied i+1 edges earlier (zero before that, after the reset).
module tb_delay_line;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic reset;
  logic [4:0] din;
  logic [3:0][4:0] taps;
  logic [4:0] hist [4];

  delay_line dut (.clk(clk), .reset(reset), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    din = 5'd31;
    @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    checks++;
    if (taps != '0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 200; n++) begin
      din = 5'($urandom_range(31));
      if (n == 150) reset = 1'b1;
      @(posedge clk);
      if (reset) begin
        for (int i = 0; i < 4; i++) hist[i] = '0;
      end else begin
        for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = din;
      end
      @(negedge clk);
      reset = 1'b0;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (taps[i] != hist[i]) begin
          failures++;
          $display("FAIL n=%0d tap %0d got %0d expected %0d", n, i, taps[i], hist[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
