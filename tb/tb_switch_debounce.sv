// tb_switch_debounce: the push-button latch must change once per press and
// once per release, however the contacts bounce in between.
module tb_switch_debounce;
  logic clk = 1'b0, rst_n = 1'b0, no_c = 1'b0, nc_c = 1'b1, q;
  int checks = 0, failures = 0, rises = 0, falls = 0;
  logic q_d = 1'b0;

  switch_debounce dut (.clk, .rst_n, .set_contact(no_c), .reset_contact(nc_c), .q);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    q_d <= q;
    if (rst_n && q && !q_d) rises++;
    if (rst_n && !q && q_d) falls++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Moving contact leaves one side, bounces on the other, settles there.
  task automatic move_to(input bit to_no);
    @(negedge clk) begin no_c = 1'b0; nc_c = 1'b0; end
    repeat (3) @(negedge clk);
    repeat (4) begin
      @(negedge clk) if (to_no) no_c = 1'b1; else nc_c = 1'b1;
      @(negedge clk) if (to_no) no_c = 1'b0; else nc_c = 1'b0;
      @(negedge clk);
    end
    @(negedge clk) if (to_no) no_c = 1'b1; else nc_c = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "released after reset");
    for (int i = 0; i < 5; i++) begin
      move_to(1'b1);
      check(q == 1'b1, "pressed");
      move_to(1'b0);
      check(q == 1'b0, "released");
    end
    // both contacts closed: hold
    @(negedge clk) no_c = 1'b1;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "both closed holds");
    check(rises == 5 && falls == 5, $sformatf("one change per press/release (%0d/%0d)", rises, falls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
