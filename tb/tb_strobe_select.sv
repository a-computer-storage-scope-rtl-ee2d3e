// tb_strobe_select: exhaustive check of the point-strobe selection.
// With strobe address set the X strobe must plot; otherwise the Y strobe.
module tb_strobe_select;
  logic x_strobe, y_strobe, strobe_addr_x, strobe;
  int checks = 0, failures = 0;

  strobe_select dut (.x_strobe, .y_strobe, .strobe_addr_x, .strobe);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {strobe_addr_x, y_strobe, x_strobe} = 3'(v);
      #1;
      checks++;
      if (strobe !== (v[2] ? v[0] : v[1])) begin
        failures++;
        $display("FAIL: sel=%0d x=%0d y=%0d -> %0d", v[2], v[0], v[1], strobe);
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
