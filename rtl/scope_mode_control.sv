// scope_mode_control: storage-scope mode and erase lines.
//
// Control bit 1 ("write thru") lets points be written without being stored,
// e.g. for a cursor; bit 2 ("non store") uses the tube as a plain refreshed
// oscilloscope; bit 4 ("erase") erases the stored display.  The front-panel
// "erase disable" switch blocks the computer's erase so that displays can be
// overlaid.  The levels pass straight from the held control word to the scope;
// TTL driver polarities are not modelled.  Combinational.
module scope_mode_control (
  input  logic ctrl_write_thru,
  input  logic ctrl_non_store,
  input  logic ctrl_erase,
  input  logic erase_disable,
  output logic write_thru,
  output logic non_store,
  output logic erase
);
  always_comb begin
    write_thru = ctrl_write_thru;
    non_store  = ctrl_non_store;
    erase      = ctrl_erase && !erase_disable;
  end
endmodule
