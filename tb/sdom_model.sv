// sdom_model: behavioural model of the computer side for testbenches: the
// stored output modules that hold the X word, the Y word and the control
// word, and their strobes.  write_x/write_y/write_ctrl present a new value;
// the X and Y writes raise a strobe for STROBE_CYCLES cycles whose trailing
// edge marks the data stable.  A write waits while the interface's ready
// level is low, as the output modules hold their data while busy.
module sdom_model #(
  parameter int unsigned STROBE_CYCLES = 5
) (
  input  logic        clk,
  input  logic        ready,
  output logic [11:0] x_word,
  output logic [11:0] y_word,
  output logic [7:0]  ctrl,
  output logic        x_strobe,
  output logic        y_strobe
);
  initial begin
    x_word = '0; y_word = '0; ctrl = '0; x_strobe = 1'b0; y_strobe = 1'b0;
  end

  task automatic wait_ready();
    @(negedge clk);
    while (!ready) @(negedge clk);
  endtask

  task automatic write_x(input logic [11:0] v);
    wait_ready();
    x_word = v; x_strobe = 1'b1;
    repeat (STROBE_CYCLES) @(negedge clk);
    x_strobe = 1'b0;
  endtask

  task automatic write_y(input logic [11:0] v);
    wait_ready();
    y_word = v; y_strobe = 1'b1;
    repeat (STROBE_CYCLES) @(negedge clk);
    y_strobe = 1'b0;
  endtask

  task automatic write_ctrl(input logic [7:0] v);
    wait_ready();
    ctrl = v;
  endtask
endmodule
