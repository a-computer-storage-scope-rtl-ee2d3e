// scope_interface: computer to storage-scope display interface (top level).
//
// A computer plots a point by writing a 12-bit X word and a 12-bit Y word to
// its stored output modules; the write of the selected axis produces a strobe.
// The interface converts the words to bipolar voltages, waits for the beam to
// get there (24 us settle delay, or 6 us when the point follows the previous
// one within 100 us), then fires a store-Z pulse whose width (1, 5, 10 or
// 25 us, chosen by two control bits) sets the point's brightness.  A ready
// level tells the computer when it may send the next point, so plotting
// overlaps with program execution.  An 8-bit control word selects settle
// always, write thru, non store, strobe axis, erase, end plot and intensity.
// The same strobes can drive an X-Y point plotter through its null detector.
//
// Blocks: strobe_select (which strobe plots), point_store_sequencer (delay
// monos M14-M16), intensity_modulator (decoder and monos M7-M10),
// scope_mode_control (write thru, non store, erase with erase disable),
// switch_debounce and plotter_control (plotter enable, seek, plot busy),
// busy_ready (the ready level, with busy disable), indicator_panel (LEDs)
// and two dac_bipolar models.  The words arrive in two's complement; the MSB
// is inverted to form the offset-binary DAC code, as in the interface.
//
// All timing is counted in cycles of clk, TICKS_PER_US per microsecond; the
// original is asynchronous TTL with analog monos, so the clock is this
// design's choice.  rst_n is synchronous, active low.  All inputs are taken
// as synchronous to clk.
module scope_interface #(
  parameter int unsigned TICKS_PER_US = scope_pkg::DEFAULT_TICKS_PER_US,
  parameter int unsigned SETTLE_US    = 24,
  parameter int unsigned SHORT_US     = 6,
  parameter int unsigned WINDOW_US    = 100,
  parameter int unsigned INT0_US      = 1,
  parameter int unsigned INT1_US      = 5,
  parameter int unsigned INT2_US      = 10,
  parameter int unsigned INT3_US      = 25,
  parameter int unsigned LED_US       = 2000,
  parameter int unsigned STOP_US      = 5,
  parameter int unsigned PENLIFT1_US  = 5,
  parameter int unsigned PENLIFT2_US  = 5,
  parameter int unsigned DAC_BITS     = 12
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // from the computer's stored output modules
  input  logic [DAC_BITS-1:0]                x_word,
  input  logic [DAC_BITS-1:0]                y_word,
  input  logic                               x_strobe,
  input  logic                               y_strobe,
  input  scope_pkg::ctrl_t                   ctrl,
  // front-panel switches
  input  logic                               erase_disable_sw,
  input  logic                               busy_disable_sw,
  input  logic                               plot_sw_no,
  input  logic                               plot_sw_nc,
  // from the storage scope and the plotter's null detector
  input  logic                               scope_erasing,
  input  logic                               nd_ready,
  input  logic                               nd_complete,
  // DACs
  output logic [DAC_BITS-1:0]                x_dac_code,
  output logic [DAC_BITS-1:0]                y_dac_code,
  output real                                x_volts,
  output real                                y_volts,
  // to the storage scope
  output logic                               store_z,
  output logic                               write_thru,
  output logic                               non_store,
  output logic                               erase,
  // to the null detector
  output logic                               nd_enable,
  output logic                               nd_seek,
  // to the computer
  output logic                               ready,
  output logic                               binary_sense,
  // indicators
  output logic [scope_pkg::NUM_LEDS-1:0]     leds,
  output logic                               plotter_lamp,
  output logic                               busy_disable_lamp,
  output logic                               erase_disable_lamp
);
  logic point_strobe, delay, fire, settling, plot_busy, button;

  // Two's complement to offset binary: invert the sign bit.
  always_comb begin
    x_dac_code = {~x_word[DAC_BITS-1], x_word[DAC_BITS-2:0]};
    y_dac_code = {~y_word[DAC_BITS-1], y_word[DAC_BITS-2:0]};
  end

  dac_bipolar #(.BITS(DAC_BITS)) u_xdac (.code(x_dac_code), .vout(x_volts));
  dac_bipolar #(.BITS(DAC_BITS)) u_ydac (.code(y_dac_code), .vout(y_volts));

  strobe_select u_strobe_select (
    .x_strobe, .y_strobe, .strobe_addr_x(ctrl.strobe_addr_x), .strobe(point_strobe));

  point_store_sequencer #(
    .TICKS_PER_US(TICKS_PER_US), .SETTLE_US(SETTLE_US),
    .SHORT_US(SHORT_US), .WINDOW_US(WINDOW_US)
  ) u_sequencer (
    .clk, .rst_n, .strobe(point_strobe), .settle_always(ctrl.settle_always),
    .settle_pulse(), .short_pulse(), .window(), .delay, .fire);

  intensity_modulator #(
    .TICKS_PER_US(TICKS_PER_US), .INT0_US(INT0_US), .INT1_US(INT1_US),
    .INT2_US(INT2_US), .INT3_US(INT3_US)
  ) u_intensity (
    .clk, .rst_n, .fire, .int_addr(ctrl.int_addr), .store_z, .sel());

  scope_mode_control u_mode (
    .ctrl_write_thru(ctrl.write_thru), .ctrl_non_store(ctrl.non_store),
    .ctrl_erase(ctrl.erase), .erase_disable(erase_disable_sw),
    .write_thru, .non_store, .erase);

  switch_debounce u_plot_button (
    .clk, .rst_n, .set_contact(plot_sw_no), .reset_contact(plot_sw_nc), .q(button));

  plotter_control #(
    .TICKS_PER_US(TICKS_PER_US), .STOP_US(STOP_US),
    .PENLIFT1_US(PENLIFT1_US), .PENLIFT2_US(PENLIFT2_US)
  ) u_plotter (
    .clk, .rst_n, .button, .end_plot(ctrl.end_plot), .strobe(point_strobe),
    .nd_ready, .nd_complete, .nd_enable, .nd_seek, .plot_busy, .binary_sense);

  // The fire cycle between the end of the delay and the start of store-Z
  // also counts as busy, so the ready level has no gap between them.
  always_comb settling = delay || fire;

  busy_ready u_busy (
    .delay(settling), .store_z, .scope_erasing, .plot_busy,
    .busy_disable(busy_disable_sw), .ready);

  indicator_panel #(.TICKS_PER_US(TICKS_PER_US), .LED_US(LED_US)) u_panel (
    .clk, .rst_n, .ctrl, .x_strobe, .y_strobe, .ready, .leds);

  always_comb begin
    plotter_lamp       = binary_sense;
    busy_disable_lamp  = busy_disable_sw;
    erase_disable_lamp = erase_disable_sw;
  end
endmodule
