// tb_intensity_modulator: for each intensity address, a fire pulse must give
// a store-Z pulse of the addressed width (1, 5, 10, 25 us at 10 cycles per
// us), starting one cycle after fire, from the addressed mono only.  The
// address may change once the pulse has started.
module tb_intensity_modulator;
  localparam int TPU = 10;
  localparam int WUS [4] = '{1, 5, 10, 25};
  logic clk = 1'b0, rst_n = 1'b0, fire = 1'b0;
  logic [1:0] int_addr = '0;
  logic store_z;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  intensity_modulator dut (.clk, .rst_n, .fire, .int_addr, .store_z, .sel);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!store_z && sel == 0, "idle");
    for (int rep = 0; rep < 2; rep++) begin
      for (int a = 0; a < 4; a++) begin
        int width;
        bit onehot_ok;
        width = 0;
        onehot_ok = 1'b1;
        @(negedge clk) begin int_addr = 2'(a); fire = 1'b1; end
        @(negedge clk) fire = 1'b0;
        int_addr = 2'(a + 1);
        while (store_z && width < 1000) begin
          if (sel != (4'b1 << a)) onehot_ok = 1'b0;
          @(negedge clk); width++;
        end
        check(width == WUS[a] * TPU, $sformatf("addr %0d width %0d", a, width));
        check(onehot_ok, $sformatf("addr %0d mono select", a));
        repeat (5) @(negedge clk);
        check(!store_z, "no second pulse");
      end
    end
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
