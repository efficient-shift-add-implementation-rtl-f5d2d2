// tb_gated_lfsr: checks the LFSR behind the clock gate.
//
// With run high the LFSR must step once every DIV = 2 clocks (and the
// gated clock must pulse only then); with run low it must hold its state
// and the gated clock must stay off. The state sequence is compared with a
// software model of the LFSR, the number of steps with the number of
// enabled cycles, and the state may change only at an enabled edge.
module tb_gated_lfsr;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic reset;
  logic run;
  logic [3:0] q;
  logic gate_en;
  logic [3:0] model;
  int steps = 0;
  int changes = 0;

  gated_lfsr dut (.clk(clk), .reset(reset), .run(run), .q(q), .gate_en(gate_en));

  always #5 clk = ~clk;

  always @(q) if (!reset) changes++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_before;
    reset = 1'b1;
    run = 1'b0;
    #12;
    reset = 1'b0;
    model = 4'b0001;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      run = !(n >= 60 && n < 100);
      #1;
      en_before = gate_en;
      @(posedge clk);
      if (en_before) begin
        model = {model[2:0], model[3] ^ model[2]};
        steps++;
      end
      #1;
      checks++;
      if (q != model) begin failures++; $display("FAIL n=%0d q=%b expected %b", n, q, model); end
    end
    // 200 cycles, 40 with run low: 160 cycles with run high, half enabled.
    checks += 2;
    if (steps != 80) begin failures++; $display("FAIL steps %0d expected 80", steps); end
    if (changes != steps) begin
      failures++;
      $display("FAIL LFSR changed %0d times, expected %0d", changes, steps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
