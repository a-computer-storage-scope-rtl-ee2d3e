// tb_plotter_control: checks the point plotter sequencing.
//  - the plotter enable button toggles plotting on and off
//  - while on, strobes reach +seek and set plot busy; while off they do not
//  - the complete pulse clears plot busy after the two 5 us pen-lift delays
//  - stopping (button, end plot, null detector off) clears plot busy via
//    the 5 us stop reset pulse, and end plot / null detector off stop plotting
module tb_plotter_control;
  localparam int TPU = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic button = 1'b0, end_plot = 1'b0, strobe = 1'b0, nd_ready = 1'b1, nd_complete = 1'b0;
  logic nd_enable, nd_seek, plot_busy, binary_sense;
  int checks = 0, failures = 0, seeks = 0;
  logic seek_d = 1'b0;

  plotter_control dut (.clk, .rst_n, .button, .end_plot, .strobe, .nd_ready, .nd_complete,
                       .nd_enable, .nd_seek, .plot_busy, .binary_sense);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    seek_d <= nd_seek;
    if (nd_seek && !seek_d) seeks++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press();
    @(negedge clk) button = 1'b1;
    repeat (5) @(negedge clk);
    button = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_strobe();
    @(negedge clk) strobe = 1'b1;
    repeat (3) @(negedge clk);
    strobe = 1'b0;
    @(negedge clk);
  endtask

  task automatic complete_and_measure();
    int n = 0;
    @(negedge clk) nd_complete = 1'b1;
    @(negedge clk) nd_complete = 1'b0;
    while (plot_busy && n < 1000) begin @(negedge clk); n++; end
    check(n >= 10 * TPU && n <= 10 * TPU + 4, $sformatf("pen-lift delay %0d cycles", n));
  endtask

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!nd_enable && !binary_sense && !plot_busy, "idle");
    s0 = seeks;
    send_strobe();
    check(seeks == s0 && !plot_busy, "no seek while off");
    press();
    check(nd_enable && binary_sense, "button turns plotting on");
    for (int i = 0; i < 3; i++) begin
      s0 = seeks;
      send_strobe();
      check(seeks == s0 + 1 && plot_busy, "strobe gives seek and busy");
      complete_and_measure();
    end
    // stop with the button while busy
    send_strobe();
    check(plot_busy, "busy before stop");
    press();
    check(!nd_enable && !binary_sense, "button turns plotting off");
    repeat (2) @(negedge clk);
    check(!plot_busy, "stop reset clears busy");
    // end plot
    press();
    check(nd_enable, "on again");
    send_strobe();
    @(negedge clk) end_plot = 1'b1;
    repeat (4) @(negedge clk);
    end_plot = 1'b0;
    repeat (4) @(negedge clk);
    check(!nd_enable && !plot_busy, "end plot stops plotting and clears busy");
    // null detector off
    press();
    check(nd_enable, "on again 2");
    @(negedge clk) nd_ready = 1'b0;
    repeat (2) @(negedge clk);
    check(!nd_enable, "null detector off clears enable");
    press();
    check(!nd_enable, "cannot enable while null detector off");
    nd_ready = 1'b1;
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
