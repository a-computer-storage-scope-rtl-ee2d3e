// tb_indicator_panel: checks every LED.  Level LEDs follow their control bit
// or the ready level; stretched LEDs stay lit LED_US after their input falls
// (LED_US reduced to 3 us here, 30 cycles).
module tb_indicator_panel;
  import scope_pkg::*;
  localparam int TPU = 10, LUS = 3, HOLD = TPU * LUS;
  logic clk = 1'b0, rst_n = 1'b0, x_strobe = 1'b0, y_strobe = 1'b0, ready = 1'b0;
  ctrl_t ctrl = '0;
  logic [NUM_LEDS-1:0] leds;
  int checks = 0, failures = 0;

  indicator_panel #(.LED_US(LUS)) dut (.clk, .rst_n, .ctrl, .x_strobe, .y_strobe, .ready, .leds);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulse one stretched input for 2 cycles and check the LED's on time.
  task automatic stretched(input int which, input led_e led);
    int on = 0;
    @(negedge clk);
    case (which)
      0: ctrl.write_thru = 1'b1;  1: ctrl.non_store = 1'b1;
      2: ctrl.end_plot = 1'b1;    3: ctrl.erase = 1'b1;
      4: x_strobe = 1'b1;         default: y_strobe = 1'b1;
    endcase
    #1 check(leds[led], $sformatf("LED %0d lit at once", led));
    @(negedge clk); @(negedge clk);
    ctrl.write_thru = 1'b0; ctrl.non_store = 1'b0; ctrl.end_plot = 1'b0;
    ctrl.erase = 1'b0; x_strobe = 1'b0; y_strobe = 1'b0;
    while (leds[led] && on < 1000) begin @(negedge clk); on++; end
    check(on >= HOLD && on <= HOLD + 2, $sformatf("LED %0d stretched %0d cycles", led, on));
    check((leds & ~(NUM_LEDS'(1) << LED_READY)) == 0, "only that LED");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(leds == 0, "all dark");
    stretched(0, LED_WTHRU);
    stretched(1, LED_NSTORE);
    stretched(2, LED_ENDPLOT);
    stretched(3, LED_ERASE);
    stretched(4, LED_XSTROBE);
    stretched(5, LED_YSTROBE);
    ctrl.settle_always = 1'b1; #1 check(leds == (NUM_LEDS'(1) << LED_SETTLE), "settle LED");
    ctrl = '0; ctrl.strobe_addr_x = 1'b1; #1 check(leds == (NUM_LEDS'(1) << LED_XPOINT), "X-point LED");
    ctrl = '0; ctrl.int_addr = 2'b01; #1 check(leds == (NUM_LEDS'(1) << LED_INT1), "intensity 1 LED");
    ctrl = '0; ctrl.int_addr = 2'b10; #1 check(leds == (NUM_LEDS'(1) << LED_INT2), "intensity 2 LED");
    ctrl = '0; ready = 1'b1; #1 check(leds == (NUM_LEDS'(1) << LED_READY), "ready LED");
    // a held write thru bit keeps its LED lit
    @(negedge clk) ctrl.write_thru = 1'b1;
    repeat (3 * HOLD) @(negedge clk);
    check(leds[LED_WTHRU], "held level stays lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
