// intensity_modulator: addressable store-Z pulse width, i.e. point intensity.
//
// The storage tube stores a point only if the beam dwells long enough, so
// brightness is set by the width of the store-Z pulse.  When the point-store
// delay ends (fire), a one-of-four decoder driven by control bits 7:6 starts
// one of four monos, and their OR is the store-Z pulse.  Widths: address 0
// gives 1 us (too short to store, used for write-through points), 1 gives
// 5 us (faint), 2 gives 10 us, 3 gives 25 us (bright).  The decoder, the four
// monos and the 1, 5 and 25 us widths follow the interface; the 10 us
// width and the order of address to mono are this design's choices.
//
// Timing: store_z rises one cycle after fire and lasts the selected width.
// sel shows which mono is running (one-hot, or zero when idle).
module intensity_modulator #(
  parameter int unsigned TICKS_PER_US = scope_pkg::DEFAULT_TICKS_PER_US,
  parameter int unsigned INT0_US = 1,
  parameter int unsigned INT1_US = 5,
  parameter int unsigned INT2_US = 10,
  parameter int unsigned INT3_US = 25
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fire,
  input  logic [1:0] int_addr,
  output logic       store_z,
  output logic [3:0] sel
);
  localparam int unsigned WIDTH_US [4] = '{INT0_US, INT1_US, INT2_US, INT3_US};

  logic [3:0] trig;

  // D1: one-of-four decoder, enabled by the end-of-delay trigger.
  always_comb begin
    trig = '0;
    trig[int_addr] = fire;
  end

  // M7..M10
  for (genvar i = 0; i < 4; i++) begin : g_mono
    mono #(.WIDTH(WIDTH_US[i] * TICKS_PER_US), .RETRIG(1'b0)) u_mono (
      .clk, .rst_n, .trig(trig[i]), .q(sel[i]));
  end

  // C1
  always_comb store_z = |sel;
endmodule
