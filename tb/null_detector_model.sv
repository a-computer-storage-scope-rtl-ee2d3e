// null_detector_model: behavioural model of the X-Y point plotter's null
// detector, for testbenches only.  While enabled, each +seek pulse starts a
// plot that takes PLOT_CYCLES clock cycles (pen moves, drops and lifts),
// after which a one-cycle complete pulse is given.  ready models the extra
// pole of the plotter's on-off switch.  Counts the points plotted.
module null_detector_model #(
  parameter int unsigned PLOT_CYCLES = 500
) (
  input  logic clk,
  input  logic power_on,
  input  logic enable,
  input  logic seek,
  output logic ready,
  output logic complete,
  output int   points
);
  int   count = 0;
  logic seek_d = 1'b0;

  assign ready = power_on;

  initial begin
    points   = 0;
    complete = 1'b0;
  end

  always @(posedge clk) begin
    seek_d   <= seek;
    complete <= 1'b0;
    if (count > 0) begin
      count <= count - 1;
      if (count == 1) begin
        complete <= 1'b1;
        points   <= points + 1;
      end
    end else if (enable && power_on && seek && !seek_d) begin
      count <= PLOT_CYCLES;
    end
  end
endmodule
