// gated_lfsr: 4-stage parallel LFSR clocked through an integrated clock
// gating cell.
//
// gate_ctrl divides the free-running clock into an enable, icg_cell turns
// that enable into a gated clock, and lfsr4 is clocked only by the gated
// clock, so its flip-flops switch only in the enabled cycles. With DIV = 2
// and run high the LFSR advances on every second rising edge of clk.
// Interface: clk, reset (asynchronous, active high), run in; q (the 4 LFSR
// stages) and gate_en (the enable in front of the gating cell) out.
// The arrangement control logic -> ICG -> LFSR follows the reference
// design; the sizes of the divider and the LFSR polynomial are this
// implementation's choices (see the submodules).
module gated_lfsr #(
  parameter int unsigned DIV = 2
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       run,
  output logic [3:0] q,
  output logic       gate_en
);

  logic gclk;

  gate_ctrl #(.DIV(DIV)) u_ctrl (
    .clk   (clk),
    .reset (reset),
    .run   (run),
    .en    (gate_en)
  );

  icg_cell u_icg (
    .clk  (clk),
    .en   (gate_en),
    .gclk (gclk)
  );

  lfsr4 u_lfsr (
    .clk   (gclk),
    .reset (reset),
    .q     (q)
  );

endmodule
