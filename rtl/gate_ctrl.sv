// gate_ctrl: control logic that produces the clock-gating enable of the
// LFSR by dividing the clock.
//
// A modulo-DIV counter runs on the free clock; en is high in the last count
// of each period, and only while run is high, so the gated clock behind the
// ICG carries one pulse in every DIV clock cycles. run = 0 stops the gated
// clock altogether.
// Interface: clk, reset (asynchronous, active high), run in; en out, a
// registered-state output that changes just after the rising edge of clk.
// Deriving the gated clock from the clock through control logic that
// divides it follows the reference design; the counter, DIV = 2 and the run
// input are this implementation's choices.
module gate_ctrl #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic run,
  output logic en
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      cnt <= '0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign en = run && (cnt == CW'(DIV - 1));

endmodule
