// point_store_sequencer: timing of the delay before each point is stored.
//
// After the computer changes a DAC word, the beam needs time to move and the
// DACs need time to settle before the point may be stored.  A point far from
// the last one needs the long settle delay (M15, 24 us); a point plotted soon
// after the previous one is close to it, so a short delay (M16, 6 us) is
// enough.  A retriggerable window mono (M14, 100 us) restarted by every point
// strobe tells the two cases apart: a strobe that comes while the window is
// open gets the short delay, one that comes after it has closed gets the
// settle delay.  Control bit 0 "settle delay always" forces the settle delay.
// The three monos and this selection rule follow the interface; the
// widths are its values.  This design's own choices: every time is a
// count of clock cycles (TICKS_PER_US per microsecond); a strobe is taken at
// its trailing edge, when the data is stable; a strobe that ends while a delay
// is still running is ignored.
//
// Timing: the delay output rises one cycle after the strobe's falling edge is
// seen and lasts exactly SETTLE_US or SHORT_US microseconds; fire is a single
// cycle pulse in the cycle after delay falls, which starts the store pulse.
module point_store_sequencer #(
  parameter int unsigned TICKS_PER_US = scope_pkg::DEFAULT_TICKS_PER_US,
  parameter int unsigned SETTLE_US    = 24,
  parameter int unsigned SHORT_US     = 6,
  parameter int unsigned WINDOW_US    = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic strobe,
  input  logic settle_always,
  output logic settle_pulse,
  output logic short_pulse,
  output logic window,
  output logic delay,
  output logic fire
);
  logic strobe_d, delay_d;
  logic accept, start_settle, start_short;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      strobe_d <= 1'b0;
      delay_d  <= 1'b0;
    end else begin
      strobe_d <= strobe;
      delay_d  <= delay;
    end
  end

  always_comb begin
    delay        = settle_pulse || short_pulse;
    accept       = strobe_d && !strobe && !delay;
    start_settle = accept && (settle_always || !window);
    start_short  = accept && !settle_always && window;
    fire         = delay_d && !delay;
  end

  // M14: retriggerable window, restarted by every accepted strobe.
  mono #(.WIDTH(WINDOW_US * TICKS_PER_US), .RETRIG(1'b1)) u_m14 (
    .clk, .rst_n, .trig(accept), .q(window));

  // M15: settle delay.
  mono #(.WIDTH(SETTLE_US * TICKS_PER_US), .RETRIG(1'b0)) u_m15 (
    .clk, .rst_n, .trig(start_settle), .q(settle_pulse));

  // M16: short delay between closely spaced points.
  mono #(.WIDTH(SHORT_US * TICKS_PER_US), .RETRIG(1'b0)) u_m16 (
    .clk, .rst_n, .trig(start_short), .q(short_pulse));

  // Only one of the two delays may ever run.
  a_one_delay: assert property (@(posedge clk) disable iff (!rst_n)
    !(settle_pulse && short_pulse));
endmodule
