// shift_add_fir_top: the two circuits of the design side by side.
//
//  * fir_filter: the 4-tap multiplierless FIR filter (5-bit data1 in, 9-bit
//    finalout out, one sample per clock, output combinational from the
//    delay line).
//  * gated_lfsr: the 4-stage parallel LFSR behind a clock-gating cell.
//
// The two do not exchange signals; each has its own clock, reset and
// ports. Port names of the filter (clk, reset, data1, finalout) are the
// reference design's; the lfsr_* names are this implementation's.
module shift_add_fir_top (
  // FIR filter
  input  logic       clk,
  input  logic       reset,
  input  logic [4:0] data1,
  output logic [8:0] finalout,
  // clock-gated LFSR
  input  logic       lfsr_clk,
  input  logic       lfsr_reset,
  input  logic       lfsr_run,
  output logic [3:0] lfsr_q,
  output logic       lfsr_gate_en
);

  fir_filter u_fir (
    .clk      (clk),
    .reset    (reset),
    .data1    (data1),
    .finalout (finalout)
  );

  gated_lfsr u_lfsr (
    .clk     (lfsr_clk),
    .reset   (lfsr_reset),
    .run     (lfsr_run),
    .q       (lfsr_q),
    .gate_en (lfsr_gate_en)
  );

endmodule
