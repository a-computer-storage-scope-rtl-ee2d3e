// tb_mono: self-checking test of the counter monostable.
// Checks the exact pulse width of a one-shot and a retriggerable mono,
// that the one-shot ignores an edge during its pulse, that the retriggerable
// one restarts, and that a held-high trigger gives only one pulse.
module tb_mono;
  localparam int W = 7;
  logic clk = 1'b0, rst_n = 1'b0, trig = 1'b0;
  logic q_os, q_rt;
  int checks = 0, failures = 0;

  mono #(.WIDTH(W), .RETRIG(1'b0)) dut_os (.clk, .rst_n, .trig, .q(q_os));
  mono #(.WIDTH(W), .RETRIG(1'b1)) dut_rt (.clk, .rst_n, .trig, .q(q_rt));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pulse trig for one cycle, then count high cycles of each output.
  task automatic pulse_trig();
    @(negedge clk) trig = 1'b1;
    @(negedge clk) trig = 1'b0;
  endtask

  int n_os, n_rt, first_os, first_rt;
  task automatic count(input int cycles);
    n_os = 0; n_rt = 0;
    repeat (cycles) begin
      @(negedge clk);
      n_os += int'(q_os);
      n_rt += int'(q_rt);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!q_os && !q_rt, "idle after reset");
    // single pulse: q high for exactly W cycles (one already seen at the
    // negedge after trig falls)
    pulse_trig();
    n_os = int'(q_os); n_rt = int'(q_rt);
    first_os = n_os; first_rt = n_rt;
    count(3 * W);
    check(first_os + n_os == W, $sformatf("one-shot width %0d", first_os + n_os));
    check(first_rt + n_rt == W, $sformatf("retrig width %0d", first_rt + n_rt));
    // second edge 3 cycles into the pulse
    pulse_trig();
    repeat (2) @(negedge clk);
    pulse_trig();
    count(3 * W);
    check(n_os == W - 5, $sformatf("one-shot ignores retrigger (%0d)", n_os));
    check(n_rt == W - 1, $sformatf("retrig restarted (%0d)", n_rt));
    // held trigger: one pulse only
    @(negedge clk) trig = 1'b1;
    count(3 * W);
    check(n_os == W, $sformatf("held trigger one pulse (%0d)", n_os));
    check(!q_os && !q_rt, "pulse ended while trigger held");
    @(negedge clk) trig = 1'b0;
    count(3);
    check(!q_os && !q_rt, "no pulse on falling edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
