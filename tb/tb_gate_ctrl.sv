// tb_gate_ctrl: checks the clock-divider enable for DIV = 2 (default) and
// DIV = 3: with run high, en is high in exactly one cycle of every DIV,
// counted from reset; with run low it stays low.
module tb_gate_ctrl;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic reset;
  logic run;
  logic en2, en3;

  gate_ctrl dut2 (.clk(clk), .reset(reset), .run(run), .en(en2));
  gate_ctrl #(.DIV(3)) dut3 (.clk(clk), .reset(reset), .run(run), .en(en3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    run = 1'b0;
    #12;
    reset = 1'b0;
    for (int n = 0; n < 300; n++) begin
      // n+1 clock edges have passed since reset; en is high when that count
      // mod DIV is DIV-1.
      @(negedge clk);
      run = (n < 120) || (n >= 200);
      #1;
      checks += 2;
      if (en2 !== (run && ((n + 1) % 2 == 1))) begin
        failures++;
        $display("FAIL DIV=2 n=%0d en=%0b", n, en2);
      end
      if (en3 !== (run && ((n + 1) % 3 == 2))) begin
        failures++;
        $display("FAIL DIV=3 n=%0d en=%0b", n, en3);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
