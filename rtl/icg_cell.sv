// icg_cell: integrated clock gating cell.
//
// gclk follows clk while the enable is high and stays low while it is low.
// The enable is produced by logic clocked on the rising edge, so it changes
// some time after that edge, while clk is high; a bare AND of clk and en
// would then cut a clock pulse short or start one late. The cell therefore
// latches en while clk is low (transparent-low latch) and ANDs the latched
// value with clk: a change of en takes effect only from the next rising
// edge, and gclk carries whole clock pulses only.
// Interface: clk, en in; gclk out. The latch that synthesis reports for
// this cell is this enable latch and is intended.
// Gating the clock with an AND to hold it low for en = 0 and using an ICG
// cell follow the reference design; the latch in front of the AND is the
// usual construction of such a cell and this implementation's choice.
module icg_cell (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
