// tb_busy_ready: exhaustive check of the ready level.
// Ready must be low when any of delay, store, erase interval or plot busy is
// active, unless the busy disable switch forces it high.
module tb_busy_ready;
  logic delay, store_z, scope_erasing, plot_busy, busy_disable, ready;
  int checks = 0, failures = 0;

  busy_ready dut (.delay, .store_z, .scope_erasing, .plot_busy, .busy_disable, .ready);

  initial begin
    for (int v = 0; v < 32; v++) begin
      bit exp;
      {busy_disable, plot_busy, scope_erasing, store_z, delay} = 5'(v);
      #1;
      exp = (v[3:0] == 0) || v[4];
      checks++;
      if (ready !== exp) begin
        failures++;
        $display("FAIL: inputs %05b ready=%0d expected %0d", v[4:0], ready, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
