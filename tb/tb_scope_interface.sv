// tb_scope_interface: end-to-end test of the display interface at its
// default parameters (10 clock cycles per microsecond).
//
// A model of the computer's output modules writes X, Y and control words and
// waits for the ready level; a model of the plotter's null detector answers
// seek pulses; the scope's erase interval is modelled here.  A monitor keeps
// its own record of when each point strobe ends and predicts, from the
// 100 us window rule and control bit 0, whether a 24 us or a 6 us delay must
// follow, and from bits 7:6 the store-Z width (1, 5, 10, 25 us).  It checks the
// exact delay and width of every store pulse, that the interface is busy from
// strobe to end of store, and the DAC codes and voltages of every word.
// Scenarios: erase (enabled and disabled), the four intensities, settle and
// short delays, window expiry, settle always, X-strobe line drawing, a
// 5 x 7 character (must take under 1 ms), line drawing speed (must be under
// 25 us per point), write thru and non store, busy disable, and plotter hard
// copy started and stopped by the button and by the end plot bit.  Every
// mechanism is counted and one that never happened is a failure.
module tb_scope_interface;
  import scope_pkg::*;
  localparam int TPU = DEFAULT_TICKS_PER_US;
  localparam int WINDOW = 100 * TPU, SETTLE = 24 * TPU, SHORT = 6 * TPU;
  localparam int WIDTHS [4] = '{1 * TPU, 5 * TPU, 10 * TPU, 25 * TPU};
  localparam int ERASE_CYCLES = 300 * TPU;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] x_word, y_word, x_dac_code, y_dac_code;
  logic x_strobe, y_strobe;
  logic [7:0] ctrl_bits;
  logic erase_disable_sw = 1'b0, busy_disable_sw = 1'b0;
  logic plot_sw_no = 1'b0, plot_sw_nc = 1'b1;
  logic scope_erasing, nd_power = 1'b1, nd_ready, nd_complete;
  real x_volts, y_volts;
  logic store_z, write_thru, non_store, erase, nd_enable, nd_seek, ready, binary_sense;
  logic [NUM_LEDS-1:0] leds;
  logic plotter_lamp, busy_disable_lamp, erase_disable_lamp;
  int plotted;

  int checks = 0, failures = 0;
  longint cyc = 0;

  scope_interface dut (
    .clk, .rst_n, .x_word, .y_word, .x_strobe, .y_strobe, .ctrl(ctrl_t'(ctrl_bits)),
    .erase_disable_sw, .busy_disable_sw, .plot_sw_no, .plot_sw_nc,
    .scope_erasing, .nd_ready, .nd_complete,
    .x_dac_code, .y_dac_code, .x_volts, .y_volts,
    .store_z, .write_thru, .non_store, .erase, .nd_enable, .nd_seek,
    .ready, .binary_sense, .leds, .plotter_lamp, .busy_disable_lamp, .erase_disable_lamp);

  sdom_model u_cpu (.clk, .ready, .x_word, .y_word, .ctrl(ctrl_bits), .x_strobe, .y_strobe);

  null_detector_model #(.PLOT_CYCLES(500)) u_nd (
    .clk, .power_on(nd_power), .enable(nd_enable), .seek(nd_seek),
    .ready(nd_ready), .complete(nd_complete), .points(plotted));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_settle = 0, n_short = 0, n_forced = 0, n_expired = 0, n_xsel = 0;
  int n_int [4] = '{0, 0, 0, 0};
  int n_erase = 0, n_erase_blocked = 0, n_busy_disable = 0, n_plot_busy = 0;
  int n_stop_end = 0, n_stop_button = 0, n_wthru = 0, n_nstore = 0, n_stores = 0;

  // ---------------- storage scope erase model ----------------
  logic erase_d = 1'b0;
  int erase_left = 0;
  always @(posedge clk) begin
    erase_d <= erase;
    if (erase && !erase_d) begin
      erase_left <= ERASE_CYCLES;
      n_erase++;
    end else if (erase_left > 0) begin
      erase_left <= erase_left - 1;
    end
  end
  always_comb scope_erasing = (erase_left > 0);

  // ---------------- reference monitor ----------------
  // Values are sampled at the clock edge, i.e. those of the cycle before it.
  logic ps_d = 1'b0, store_d = 1'b0;
  bit have_last = 1'b0, pending = 1'b0;
  longint last_accept = 0, accept_at = 0, store_at = 0;
  int exp_delay = 0, exp_width = 0, exp_addr = 0;
  bit check_busy = 1'b1;

  always @(posedge clk) begin
    logic ps;
    cyc++;
    ps = ctrl_bits[3] ? x_strobe : y_strobe;
    ps_d <= ps;
    store_d <= store_z;
    if (rst_n && ps_d && !ps && !pending) begin
      bit open_w;
      open_w = have_last && (cyc - last_accept) <= longint'(WINDOW);
      exp_delay = (ctrl_bits[0] || !open_w) ? SETTLE : SHORT;
      if (exp_delay == SETTLE) n_settle++; else n_short++;
      if (ctrl_bits[0] && open_w) n_forced++;
      if (have_last && !open_w) n_expired++;
      if (ctrl_bits[3]) n_xsel++;
      exp_addr  = int'(ctrl_bits[7:6]);
      exp_width = WIDTHS[exp_addr];
      accept_at = cyc;
      last_accept = cyc;
      have_last = 1'b1;
      pending = 1'b1;
    end
    if (rst_n && store_z && !store_d) begin
      store_at = cyc;
      check(pending, "store pulse without a strobe");
      check(cyc - accept_at == longint'(exp_delay) + 64'sd2,
            $sformatf("delay %0d cycles, expected %0d", cyc - accept_at - 2, exp_delay));
    end
    if (rst_n && !store_z && store_d) begin
      check(cyc - store_at == longint'(exp_width),
            $sformatf("store width %0d, expected %0d", cyc - store_at, exp_width));
      n_int[exp_addr]++;
      n_stores++;
      pending = 1'b0;
    end
    // busy from the strobe's end to the end of the store pulse
    if (rst_n && pending && cyc > accept_at && !busy_disable_sw && check_busy) begin
      if (ready) check(1'b0, "ready during point store");
    end
    if (rst_n && busy_disable_sw) begin
      if (!ready) check(1'b0, "busy disable must force ready");
      if (pending && cyc > accept_at) n_busy_disable++;
    end
    if (rst_n && scope_erasing && ready && !busy_disable_sw) check(1'b0, "ready while erasing");
    if (rst_n && dut.u_plotter.plot_busy && !busy_disable_sw) begin
      if (ready) check(1'b0, "ready while plotting");
      n_plot_busy++;
    end
    if (write_thru) n_wthru++;
    if (non_store) n_nstore++;
  end

  // ---------------- helpers ----------------
  function automatic real volts(input logic [11:0] w);
    return real'(int'($signed(w))) / 2048.0 * 10.0;
  endfunction

  task automatic check_dacs();
    real ex, ey;
    ex = volts(x_word); ey = volts(y_word);
    check(x_dac_code == (x_word ^ 12'h800) && y_dac_code == (y_word ^ 12'h800), "DAC codes");
    check(x_volts - ex < 1e-9 && ex - x_volts < 1e-9 && y_volts - ey < 1e-9 && ey - y_volts < 1e-9,
          $sformatf("DAC volts %f %f", x_volts, y_volts));
  endtask

  // One point: X word, then Y word whose strobe plots it.
  task automatic plot_xy(input logic [11:0] x, input logic [11:0] y);
    u_cpu.write_x(x);
    u_cpu.write_y(y);
    check_dacs();
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!ready || pending) @(negedge clk);
  endtask

  task automatic press_plot_button();
    @(negedge clk) begin plot_sw_nc = 1'b0; end
    repeat (3) @(negedge clk);
    plot_sw_no = 1'b1; @(negedge clk); plot_sw_no = 1'b0; @(negedge clk); plot_sw_no = 1'b1;
    repeat (20) @(negedge clk);
    plot_sw_no = 1'b0;
    repeat (3) @(negedge clk);
    plot_sw_nc = 1'b1; @(negedge clk); plot_sw_nc = 1'b0; @(negedge clk); plot_sw_nc = 1'b1;
    repeat (5) @(negedge clk);
  endtask

  function automatic logic [7:0] cw(input bit settle, input bit xsel, input int addr);
    ctrl_t c;
    c = '0;
    c.settle_always = settle;
    c.strobe_addr_x = xsel;
    c.int_addr = 2'(addr);
    return c;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    longint t0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(ready && !store_z && !binary_sense, "idle after reset");

    // Erase before a new display, then with erase disabled.
    u_cpu.write_ctrl(8'h10);
    @(negedge clk) u_cpu.ctrl = 8'h00;
    repeat (3) @(negedge clk);
    check(!ready && scope_erasing, "busy while erasing");
    wait_idle();
    erase_disable_sw = 1'b1;
    u_cpu.write_ctrl(8'h10);
    repeat (3) @(negedge clk);
    if (!erase) n_erase_blocked++;
    check(!erase && ready && erase_disable_lamp, "erase disable blocks erase");
    u_cpu.write_ctrl(8'h00);
    erase_disable_sw = 1'b0;

    // Four intensities, points far apart in time (settle each).
    for (int a = 0; a < 4; a++) begin
      u_cpu.write_ctrl(cw(1'b0, 1'b0, a));
      #1 check(leds[LED_INT1] == a[0] && leds[LED_INT2] == a[1], "intensity LEDs");
      plot_xy(12'(100 * a), 12'hF00 + 12'(a));
      wait_idle();
      repeat (WINDOW + 50) @(negedge clk);
    end

    // Line: closely spaced points get the short delay; time per point.
    u_cpu.write_ctrl(cw(1'b0, 1'b0, 1));
    plot_xy(12'h000, 12'h000);
    wait_idle();
    t0 = cyc;
    for (int i = 1; i <= 20; i++) plot_xy(12'(i), 12'(i));
    wait_idle();
    $display("line: %0d cycles per point", (cyc - t0) / 20);
    check((cyc - t0) / 20 <= 25 * TPU, $sformatf("line speed %0d cycles per point", (cyc - t0) / 20));

    // X strobe address: line along X with X words only; Y strobes do not plot.
    u_cpu.write_ctrl(cw(1'b0, 1'b1, 2));
    #1 check(leds[LED_XPOINT], "X-point LED");
    for (int i = 0; i < 10; i++) begin
      u_cpu.write_x(12'hE00 + 12'(i * 4));
      check_dacs();
    end
    wait_idle();
    begin
      int s0;
      s0 = n_stores;
      u_cpu.write_y(12'h123);
      repeat (SETTLE + 100) @(negedge clk);
      check(n_stores == s0 && ready, "Y strobe ignored in X-strobe mode");
    end

    // Settle delay always, inside the window.
    u_cpu.write_ctrl(cw(1'b1, 1'b0, 3));
    #1 check(leds[LED_SETTLE], "settle LED");
    for (int i = 0; i < 4; i++) plot_xy(12'(i), 12'h010);
    wait_idle();

    // A 5 x 7 character, all 35 dots, faint intensity.
    repeat (WINDOW + 50) @(negedge clk);
    u_cpu.write_ctrl(cw(1'b0, 1'b0, 1));
    t0 = cyc;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 5; c++) plot_xy(12'(c * 8), 12'(r * 8));
    wait_idle();
    $display("5x7 character: %0d cycles", cyc - t0);
    check(cyc - t0 < 1000 * TPU, $sformatf("5x7 character took %0d cycles", cyc - t0));

    // Write thru and non store levels.
    u_cpu.write_ctrl(8'h02);
    #1 check(write_thru && !non_store && leds[LED_WTHRU], "write thru");
    plot_xy(12'h7FF, 12'h800);
    wait_idle();
    u_cpu.write_ctrl(8'h04);
    #1 check(non_store && !write_thru && leds[LED_NSTORE], "non store");
    plot_xy(12'h800, 12'h7FF);
    wait_idle();
    u_cpu.write_ctrl(8'h00);

    // Busy disable: ready stays high during a point store.
    busy_disable_sw = 1'b1;
    plot_xy(12'h001, 12'h002);
    repeat (SETTLE + 300) @(negedge clk);
    check(busy_disable_lamp, "busy disable lamp");
    busy_disable_sw = 1'b0;
    wait_idle();

    // Plotter hard copy.
    press_plot_button();
    check(binary_sense && plotter_lamp && nd_enable, "plotter enabled by button");
    for (int i = 0; i < 3; i++) plot_xy(12'(i * 100), 12'(i * 50));
    wait_idle();
    check(plotted == 3, $sformatf("plotter drew %0d of 3 points", plotted));
    // End plot pulse from the computer.
    u_cpu.write_ctrl(8'h20);
    #1 check(leds[LED_ENDPLOT], "end plot LED");
    u_cpu.write_ctrl(8'h00);
    repeat (5) @(negedge clk);
    if (!binary_sense) n_stop_end++;
    check(!binary_sense && !nd_enable, "end plot stops plotter");
    // Start again, plot one point, stop with the button.
    press_plot_button();
    check(binary_sense, "plotter re-enabled");
    plot_xy(12'h050, 12'h050);
    wait_idle();
    check(plotted == 4, "fourth point plotted");
    press_plot_button();
    if (!binary_sense) n_stop_button++;
    check(!binary_sense, "button stops plotter");
    plot_xy(12'h060, 12'h060);
    wait_idle();
    repeat (600) @(negedge clk);
    check(plotted == 4, "no plot while disabled");
    check(leds[LED_READY] == ready, "ready LED");

    // ---------------- mechanisms ----------------
    check(n_settle > 0, "settle delay happened");
    check(n_short > 0, "short delay happened");
    check(n_expired > 0, "window expiry happened");
    check(n_forced > 0, "settle always forced a settle delay");
    check(n_xsel > 0, "X strobe plotted");
    for (int a = 0; a < 4; a++) check(n_int[a] > 0, $sformatf("intensity %0d used", a));
    check(n_erase > 0, "erase happened");
    check(n_erase_blocked > 0, "erase disable happened");
    check(n_busy_disable > 0, "busy disable happened");
    check(n_plot_busy > 0, "plot busy happened");
    check(n_stop_end > 0 && n_stop_button > 0, "plotter stops happened");
    check(n_wthru > 0 && n_nstore > 0, "write thru and non store happened");
    $display("mechanisms: settle=%0d short=%0d expired=%0d forced=%0d xsel=%0d int=%0d/%0d/%0d/%0d erase=%0d blocked=%0d busydis=%0d plotbusy=%0d plotted=%0d stores=%0d",
             n_settle, n_short, n_expired, n_forced, n_xsel, n_int[0], n_int[1], n_int[2], n_int[3],
             n_erase, n_erase_blocked, n_busy_disable, n_plot_busy, plotted, n_stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
