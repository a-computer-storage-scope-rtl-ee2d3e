// indicator_panel: the eleven front-panel LEDs.
//
// LED order: 0 settle delay (bit 0), 1 write thru (bit 1), 2 non store
// (bit 2), 3 X-point store (bit 3), 4 end plot pulse (bit 5), 5 erase (bit 4),
// 6 intensity 1 (bit 6), 7 intensity 2 (bit 7), 8 X strobe, 9 Y strobe,
// 10 ready level.  Signals that may be too short to see -- write thru,
// non store, erase, end plot and the two strobes -- go through 2 ms pulse
// stretchers (monos M1-M6): such an LED is lit while its input is high and
// for LED_US after the input falls.  The others show the level directly.
// The LED set, the 2 ms stretchers and which signals they stretch follow the
// interface; the stretch-after-fall behaviour is this design's reading.
module indicator_panel #(
  parameter int unsigned TICKS_PER_US = scope_pkg::DEFAULT_TICKS_PER_US,
  parameter int unsigned LED_US       = 2000
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  scope_pkg::ctrl_t                   ctrl,
  input  logic                               x_strobe,
  input  logic                               y_strobe,
  input  logic                               ready,
  output logic [scope_pkg::NUM_LEDS-1:0]     leds
);
  import scope_pkg::*;

  // Stretched signals: write thru, non store, end plot, erase, X, Y strobe.
  localparam int NS = 6;
  logic [NS-1:0] sig, sig_d, hold;

  always_comb sig = {y_strobe, x_strobe, ctrl.erase, ctrl.end_plot,
                     ctrl.non_store, ctrl.write_thru};

  always_ff @(posedge clk) begin
    if (!rst_n) sig_d <= '0;
    else        sig_d <= sig;
  end

  for (genvar i = 0; i < NS; i++) begin : g_stretch
    mono #(.WIDTH(LED_US * TICKS_PER_US), .RETRIG(1'b1)) u_mono (
      .clk, .rst_n, .trig(sig_d[i] && !sig[i]), .q(hold[i]));
  end

  always_comb begin
    leds              = '0;
    leds[LED_SETTLE]  = ctrl.settle_always;
    leds[LED_WTHRU]   = sig[0] || hold[0];
    leds[LED_NSTORE]  = sig[1] || hold[1];
    leds[LED_XPOINT]  = ctrl.strobe_addr_x;
    leds[LED_ENDPLOT] = sig[2] || hold[2];
    leds[LED_ERASE]   = sig[3] || hold[3];
    leds[LED_INT1]    = ctrl.int_addr[0];
    leds[LED_INT2]    = ctrl.int_addr[1];
    leds[LED_XSTROBE] = sig[4] || hold[4];
    leds[LED_YSTROBE] = sig[5] || hold[5];
    leds[LED_READY]   = ready;
  end
endmodule
