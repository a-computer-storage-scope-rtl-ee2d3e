// tb_dac_bipolar: checks the DAC model's transfer function at the ends, at
// mid scale and at random codes against vout = (code - 2048) / 2048 * 10 V.
module tb_dac_bipolar;
  logic [11:0] code;
  real vout;
  int checks = 0, failures = 0;

  dac_bipolar dut (.code, .vout);

  task automatic check_code(input logic [11:0] c);
    real exp, err;
    code = c;
    #1;
    exp = (real'(int'(c)) - 2048.0) * 10.0 / 2048.0;
    err = vout - exp;
    checks++;
    if (err > 1.0e-9 || err < -1.0e-9) begin
      failures++;
      $display("FAIL: code %0d vout %f expected %f", c, vout, exp);
    end
  endtask

  initial begin
    check_code(12'd0);
    check_code(12'd2048);
    check_code(12'd4095);
    check_code(12'd1024);
    for (int i = 0; i < 50; i++) check_code(12'($urandom));
    checks++;
    code = 12'd0; #1;
    if (vout != -10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
