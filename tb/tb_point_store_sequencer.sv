// tb_point_store_sequencer: checks the settle/short delay selection and the
// exact delay lengths at the default 10 cycles per microsecond.
//  - first strobe after reset: 24 us settle delay (240 cycles)
//  - strobes within the 100 us window: 6 us short delay (60 cycles)
//  - strobe after the window has closed: settle delay again
//  - control bit 0 set: settle delay even inside the window
//  - a strobe during a running delay is ignored
// Each delay must start one cycle after the strobe's trailing edge and be
// followed by exactly one fire pulse.
module tb_point_store_sequencer;
  localparam int TPU = 10;
  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0, settle_always = 1'b0;
  logic settle_pulse, short_pulse, window, delay, fire;
  int checks = 0, failures = 0, fires = 0;

  point_store_sequencer dut (.clk, .rst_n, .strobe, .settle_always,
                             .settle_pulse, .short_pulse, .window, .delay, .fire);

  always #5 clk = ~clk;
  always @(posedge clk) if (fire) fires++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_strobe();
    @(negedge clk) strobe = 1'b1;
    repeat (3) @(negedge clk);
    strobe = 1'b0;
  endtask

  // Strobe, then measure latency, width and kind of the delay.
  task automatic point(input bit exp_settle, input string what);
    int lat = 0, width = 0, f0;
    bit was_settle = 1'b0, was_short = 1'b0;
    send_strobe();
    f0 = fires;
    while (!delay && lat < 50) begin @(negedge clk); lat++; end
    while (delay && width < 1000) begin
      was_settle |= settle_pulse; was_short |= short_pulse;
      @(negedge clk); width++;
    end
    check(lat == 1, $sformatf("%s: latency %0d", what, lat));
    check(fire, $sformatf("%s: fire after delay", what));
    @(negedge clk);
    check(fires == f0 + 1, $sformatf("%s: one fire (%0d)", what, fires - f0));
    if (exp_settle) begin
      check(width == 24 * TPU && was_settle && !was_short, $sformatf("%s: settle width %0d", what, width));
    end else begin
      check(width == 6 * TPU && was_short && !was_settle, $sformatf("%s: short width %0d", what, width));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!delay && !window, "idle after reset");
    point(1'b1, "first point");
    point(1'b0, "second point in window");
    repeat (20 * TPU) @(negedge clk);
    point(1'b0, "third point in window");
    // let the window close: 100 us after the last strobe
    repeat (100 * TPU) @(negedge clk);
    check(!window, "window closed");
    point(1'b1, "after window");
    settle_always = 1'b1;
    check(window, "window open");
    point(1'b1, "settle always");
    settle_always = 1'b0;
    // strobe during a delay is ignored
    begin
      int width, f0;
      width = 0;
      send_strobe();
      f0 = fires;
      repeat (10) @(negedge clk);
      send_strobe();
      while (delay && width < 1000) begin @(negedge clk); width++; end
      repeat (200) @(negedge clk);
      check(!delay && fires == f0 + 1, "overlapping strobe ignored");
      check(width == 6 * TPU - 13, $sformatf("first delay kept its length (%0d left)", width));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
