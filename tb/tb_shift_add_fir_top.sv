// tb_shift_add_fir_top: end-to-end test of the whole design at its default
// parameters.
//
// FIR side (clk, 10 ns): reset, the 3 -> 5 step sequence of the reference
// waveform (33 and 55 in steady state), an impulse (1, 3, 4, 3), a
// full-scale input (341) and 3000 random samples, all against a software
// convolution with h = {1, 3, 4, 3}.
// LFSR side (lfsr_clk, 14 ns, unrelated to clk): run high and low in turn;
// the LFSR state is compared with a software model that steps only in
// enabled cycles.
// Each mechanism is counted and a mechanism that never happened is a
// failure: filter reset, step response, impulse response, full-scale
// output, products through a shift-and-subtract tap, gated clock pulses,
// cycles where the divider holds the clock off, cycles stopped by run = 0,
// a full LFSR period, and the LFSR reset.
module tb_shift_add_fir_top;

  localparam int H [4] = '{1, 3, 4, 3};

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       reset;
  logic [4:0] data1;
  logic [8:0] finalout;
  logic       lfsr_clk = 1'b0;
  logic       lfsr_reset;
  logic       lfsr_run;
  logic [3:0] lfsr_q;
  logic       lfsr_gate_en;

  shift_add_fir_top dut (
    .clk          (clk),
    .reset        (reset),
    .data1        (data1),
    .finalout     (finalout),
    .lfsr_clk     (lfsr_clk),
    .lfsr_reset   (lfsr_reset),
    .lfsr_run     (lfsr_run),
    .lfsr_q       (lfsr_q),
    .lfsr_gate_en (lfsr_gate_en)
  );

  always #5 clk = ~clk;
  always #7 lfsr_clk = ~lfsr_clk;

  // Mechanism counters.
  int n_fir_reset = 0, n_step = 0, n_impulse = 0, n_full_scale = 0, n_sub_tap = 0;
  int n_gate_on = 0, n_gate_div_off = 0, n_gate_stopped = 0, n_lfsr_period = 0, n_lfsr_reset = 0;

  bit fir_done = 1'b0;
  bit lfsr_done = 1'b0;
  int hist [4];

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- FIR
  function automatic int conv();
    int s = 0;
    for (int i = 0; i < 4; i++) s += H[i] * hist[i];
    return s;
  endfunction

  task automatic fir_step(int d, int expect_v);
    data1 = 5'(d);
    @(posedge clk);
    for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = d;
    if (hist[1] != 0 || hist[3] != 0) n_sub_tap++;
    @(negedge clk);
    checks++;
    if (finalout != 9'(conv()) || (expect_v >= 0 && finalout != 9'(expect_v))) begin
      failures++;
      $display("FAIL fir d=%0d got %0d model %0d expected %0d", d, finalout, conv(), expect_v);
    end
    if (finalout == 9'd341) n_full_scale++;
  endtask

  task automatic fir_reset();
    reset = 1'b1;
    @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 4; i++) hist[i] = 0;
    checks++;
    if (finalout != '0) begin failures++; $display("FAIL fir reset %0d", finalout); end
    else n_fir_reset++;
  endtask

  initial begin
    int good;
    reset = 1'b1;
    data1 = '0;
    @(negedge clk);
    fir_reset();
    good = failures;
    fir_step(3, 3);  fir_step(3, 12); fir_step(3, 24); fir_step(3, 33);
    fir_step(5, 35); fir_step(5, 41); fir_step(5, 49); fir_step(5, 55);
    if (failures == good) n_step++;
    fir_reset();
    good = failures;
    fir_step(1, 1); fir_step(0, 3); fir_step(0, 4); fir_step(0, 3); fir_step(0, 0);
    if (failures == good) n_impulse++;
    for (int n = 0; n < 4; n++) fir_step(31, -1);
    for (int n = 0; n < 3000; n++) fir_step(int'($urandom_range(31)), -1);
    fir_done = 1'b1;
  end

  // --------------------------------------------------------------- LFSR
  initial begin
    logic [3:0] model;
    logic       en_before;
    int         since_seed;
    lfsr_reset = 1'b1;
    lfsr_run = 1'b0;
    #20;
    lfsr_reset = 1'b0;
    model = 4'b0001;
    since_seed = 0;
    checks++;
    if (lfsr_q != 4'b0001) begin failures++; $display("FAIL lfsr reset %b", lfsr_q); end
    else n_lfsr_reset++;
    for (int n = 0; n < 400; n++) begin
      @(negedge lfsr_clk);
      lfsr_run = (n % 100) < 70;
      #1;
      // n+1 lfsr_clk edges have passed since reset: the divide-by-2 enable
      // is expected in every second cycle, and only while run is high.
      en_before = lfsr_run && ((n + 1) % 2 == 1);
      checks++;
      if (lfsr_gate_en != en_before) begin
        failures++;
        $display("FAIL gate enable n=%0d got %0b expected %0b", n, lfsr_gate_en, en_before);
      end
      if (!lfsr_run) n_gate_stopped++;
      else if (!en_before) n_gate_div_off++;
      @(posedge lfsr_clk);
      if (en_before) begin
        model = {model[2:0], model[3] ^ model[2]};
        n_gate_on++;
        since_seed++;
        if (model == 4'b0001) begin
          if (since_seed == 15) n_lfsr_period++;
          since_seed = 0;
        end
      end
      #1;
      checks++;
      if (lfsr_q != model) begin failures++; $display("FAIL lfsr n=%0d q=%b model %b", n, lfsr_q, model); end
    end
    lfsr_done = 1'b1;
  end

  // ------------------------------------------------------------- summary
  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-22s happened %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism %s never happened", what); end
  endtask

  initial begin
    wait (fir_done && lfsr_done);
    need("fir_reset", n_fir_reset);
    need("fir_step_response", n_step);
    need("fir_impulse_response", n_impulse);
    need("fir_full_scale", n_full_scale);
    need("shift_subtract_tap", n_sub_tap);
    need("gated_clock_pulse", n_gate_on);
    need("gate_held_by_divider", n_gate_div_off);
    need("gate_stopped_by_run", n_gate_stopped);
    need("lfsr_full_period", n_lfsr_period);
    need("lfsr_reset", n_lfsr_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
