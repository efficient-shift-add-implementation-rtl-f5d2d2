// tb_fir_filter: checks the 4-tap shift-add FIR filter.
//
// 1. The step sequence of the reference waveform: data1 = 3 held from reset,
//    then 5. finalout must read 3, 12, 24, 33 (= 3*(1+3+4+3)) and then 35,
//    41, 49, 55 on successive clocks.
// 2. An impulse: the output must be the coefficients 1, 3, 4, 3 on the four
//    clocks after the sample is taken, then 0 (latency: h0 visible right
//    after the capturing edge).
// 3. 2000 random samples against a software convolution, on the default
//    filter (CSD, unsigned) and on a second instance with binary recoding
//    and two's-complement samples.
// The expected values are computed here from the coefficient list alone.
module tb_fir_filter;

  localparam int H [4] = '{1, 3, 4, 3};

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic reset;
  logic [4:0] data1;
  logic [8:0] finalout, finalout_s;
  int hist [4];

  fir_filter dut (.clk(clk), .reset(reset), .data1(data1), .finalout(finalout));
  fir_filter #(.RECODE(fir_pkg::RECODE_BINARY), .SIGNED_IN(1'b1)) dut_s (
    .clk(clk), .reset(reset), .data1(data1), .finalout(finalout_s));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(bit sgn);
    int s = 0;
    for (int i = 0; i < 4; i++) s += H[i] * ((sgn && hist[i] >= 16) ? hist[i] - 32 : hist[i]);
    return s;
  endfunction

  // Apply one sample at the falling edge, clock it in, then compare.
  task automatic step(int d, int expect_v, bit use_expect);
    data1 = 5'(d);
    @(posedge clk);
    for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = d;
    @(negedge clk);
    checks += 2;
    if (use_expect && finalout != 9'(expect_v)) begin
      failures++;
      $display("FAIL fixed d=%0d got %0d expected %0d", d, finalout, expect_v);
    end
    if (finalout != 9'(conv(1'b0))) begin
      failures++;
      $display("FAIL unsigned d=%0d got %0d expected %0d", d, finalout, 9'(conv(1'b0)));
    end
    if (finalout_s != 9'(conv(1'b1))) begin
      failures++;
      $display("FAIL signed d=%0d got %0d expected %0d", d, finalout_s, 9'(conv(1'b1)));
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    data1 = '0;
    @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 4; i++) hist[i] = 0;
    checks++;
    if (finalout != '0) begin failures++; $display("FAIL reset output %0d", finalout); end
  endtask

  initial begin
    do_reset();
    // Step 3 -> 5.
    step(3, 3, 1);  step(3, 12, 1); step(3, 24, 1); step(3, 33, 1);
    step(5, 35, 1); step(5, 41, 1); step(5, 49, 1); step(5, 55, 1);
    // Impulse response.
    do_reset();
    step(1, 1, 1); step(0, 3, 1); step(0, 4, 1); step(0, 3, 1); step(0, 0, 1);
    // Full scale input: 31 * 11 = 341.
    for (int n = 0; n < 4; n++) step(31, 0, 0);
    checks++;
    if (finalout != 9'd341) begin failures++; $display("FAIL full scale %0d", finalout); end
    // Random samples.
    for (int n = 0; n < 2000; n++) step(int'($urandom_range(31)), 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
