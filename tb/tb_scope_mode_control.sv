// tb_scope_mode_control: exhaustive check of the scope mode and erase lines.
// Write thru and non store follow their control bits; erase follows bit 4
// only while the erase disable switch is off.
module tb_scope_mode_control;
  logic cw, cn, ce, ed, write_thru, non_store, erase;
  int checks = 0, failures = 0;

  scope_mode_control dut (.ctrl_write_thru(cw), .ctrl_non_store(cn), .ctrl_erase(ce),
                          .erase_disable(ed), .write_thru, .non_store, .erase);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ed, ce, cn, cw} = 4'(v);
      #1;
      checks++;
      if (write_thru !== v[0] || non_store !== v[1] || erase !== (v[2] && !v[3])) begin
        failures++;
        $display("FAIL: in %04b -> wt=%0d ns=%0d er=%0d", v[3:0], write_thru, non_store, erase);
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
