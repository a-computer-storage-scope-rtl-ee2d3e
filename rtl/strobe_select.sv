// strobe_select: chooses which stored-output strobe plots a point.
//
// Normally the Y strobe starts a point store, so the program writes X then Y.
// When control bit 3 ("strobe address") is set the X strobe is used instead,
// so a line along the X axis needs only new X words.  Purely combinational.
// The selection rule is the interface's; its gate-level form is not copied.
module strobe_select (
  input  logic x_strobe,
  input  logic y_strobe,
  input  logic strobe_addr_x,
  output logic strobe
);
  always_comb strobe = strobe_addr_x ? x_strobe : y_strobe;
endmodule
