// switch_debounce: R-S latch on the two contacts of a push button.
//
// The plotter enable button is a changeover switch.  Closing its normally-open
// contact sets the latch; closing its normally-closed contact resets it.
// While the moving contact bounces it touches neither, so the latch holds
// and its output changes once per press and once per release.  If both
// contacts read closed the latch also holds.  The cross-coupled R-S latch
// follows the interface; making it a clocked flip-flop is this design's
// choice.  Inputs are taken as synchronous to clk; rst_n is synchronous.
module switch_debounce (
  input  logic clk,
  input  logic rst_n,
  input  logic set_contact,
  input  logic reset_contact,
  output logic q
);
  always_ff @(posedge clk) begin
    if (!rst_n)                           q <= 1'b0;
    else if (set_contact && !reset_contact) q <= 1'b1;
    else if (reset_contact && !set_contact) q <= 1'b0;
  end
endmodule
