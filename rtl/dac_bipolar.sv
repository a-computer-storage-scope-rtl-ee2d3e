// dac_bipolar: behavioural model of a bipolar hybrid D/A converter.
//
// This is a behavioural model of an analog part, not synthesizable logic.
// The interface positions the beam (and the plotter pen) with two 12-bit
// bipolar DACs, so the program can also send negative voltages and use the
// full width of the rectangular tube.  The model takes an offset-binary code
// (code 2^(BITS-1) is 0 V) and gives the ideal output voltage
//   vout = (code - 2^(BITS-1)) / 2^(BITS-1) * FULL_SCALE_V.
// Settling is not modelled; the point-store sequencer's delays cover it.
// The 12-bit width and the bipolar output follow the interface; the
// +/-10 V range is this model's own choice.
module dac_bipolar #(
  parameter int unsigned BITS         = 12,
  parameter real         FULL_SCALE_V = 10.0
) (
  input  logic [BITS-1:0] code,
  output real             vout
);
  localparam int HALF = 1 << (BITS - 1);
  always_comb vout = (real'(int'(code)) - real'(HALF)) / real'(HALF) * FULL_SCALE_V;
endmodule
