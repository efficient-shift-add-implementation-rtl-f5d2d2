// tb_icg_cell: checks the clock gating cell.
//
// en is changed 2 ns after a rising clock edge (as a flip-flop output
// would), sometimes while the clock is high. gclk may only rise at a rising
// edge of clk and fall at a falling edge, must pulse exactly in the cycles
// whose preceding low phase saw en = 1, and must stay low otherwise.
module tb_icg_cell;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int expected_pulses = 0;
  int pulses = 0;

  icg_cell dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gclk edges must coincide with clk edges of the same direction.
  always @(posedge gclk) begin
    pulses++;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("FAIL gclk rose while clk low at %0t", $time); end
  end
  always @(negedge gclk) begin
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL gclk fell while clk high at %0t", $time); end
  end

  initial begin
    logic en_at_edge;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      en_at_edge = en;                      // value held through the low phase
      @(posedge clk);
      if (en_at_edge) expected_pulses++;
      #1;
      checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("FAIL cycle %0d gclk=%0b expected %0b", n, gclk, en_at_edge);
      end
      #1;
      en = 1'($urandom_range(1));           // changes during the high phase
      #1;
      checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("FAIL cycle %0d glitch after en change, gclk=%0b", n, gclk);
      end
      @(negedge clk);
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulses %0d expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
