// plotter_control: sequencing of the X-Y point plotter.
//
// The plotter draws a point when its null detector receives a "+seek" pulse,
// drives the pen to the DAC voltages, and answers with a "complete" pulse
// once the pen is down and lifted again.  The enable flip-flop F1 turns
// plotting on and off: each press of the plotter enable button toggles it,
// the computer's end-plot pulse (control bit 5) clears it, and it is held clear
// while the null detector's ready pole is off.  While F1 is set the null
// detector is enabled, the point strobes pass to +seek, and each strobe sets
// the plot-busy flip-flop A11-B2, which keeps the interface busy.  The
// complete pulse starts the pen-lift delay M12 then M13; when M13 ends,
// plot-busy is reset (gated with F1, as A10 does).  When F1 clears, M11 gives a stop reset pulse to plot-busy.
// binary_sense reports F1 to the computer.
//
// The flip-flops, monos and their roles follow the interface.  This design's
// own choices: F1 toggles on the button's press edge; end plot acts on its
// rising edge; plot-busy is reset at the end of M13, so the whole M12 + M13
// time passes first; the M11 stop reset wins over a set; pulse widths are
// counted in clock cycles.
//
// Timing: plot_busy rises in the cycle after a strobe is seen while enabled
// and falls about PENLIFT1_US + PENLIFT2_US after the complete pulse.
module plotter_control #(
  parameter int unsigned TICKS_PER_US = scope_pkg::DEFAULT_TICKS_PER_US,
  parameter int unsigned STOP_US      = 5,
  parameter int unsigned PENLIFT1_US  = 5,
  parameter int unsigned PENLIFT2_US  = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic button,
  input  logic end_plot,
  input  logic strobe,
  input  logic nd_ready,
  input  logic nd_complete,
  output logic nd_enable,
  output logic nd_seek,
  output logic plot_busy,
  output logic binary_sense
);
  logic f1, f1_d, button_d, end_plot_d, m12_q, m12_d, m13_q, m13_d, m11_q;
  logic press, end_edge, f1_fall, m12_fall, m13_fall;

  always_comb begin
    press    = button && !button_d;
    end_edge = end_plot && !end_plot_d;
    f1_fall  = f1_d && !f1;
    m12_fall = m12_d && !m12_q;
    m13_fall = m13_d && !m13_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      button_d   <= 1'b0;
      end_plot_d <= 1'b0;
      f1_d       <= 1'b0;
      m12_d      <= 1'b0;
      m13_d      <= 1'b0;
    end else begin
      button_d   <= button;
      end_plot_d <= end_plot;
      f1_d       <= f1;
      m12_d      <= m12_q;
      m13_d      <= m13_q;
    end
  end

  // F1: plotter enable.
  always_ff @(posedge clk) begin
    if (!rst_n || !nd_ready) f1 <= 1'b0;
    else if (end_edge)       f1 <= 1'b0;
    else if (press)          f1 <= !f1;
  end

  // A9: strobes to +seek while enabled.
  always_comb nd_seek = strobe && f1;

  // M11 stop reset, M12-M13 pen lift delay.
  mono #(.WIDTH(STOP_US * TICKS_PER_US)) u_m11 (
    .clk, .rst_n, .trig(f1_fall), .q(m11_q));
  mono #(.WIDTH(PENLIFT1_US * TICKS_PER_US)) u_m12 (
    .clk, .rst_n, .trig(nd_complete), .q(m12_q));
  mono #(.WIDTH(PENLIFT2_US * TICKS_PER_US)) u_m13 (
    .clk, .rst_n, .trig(m12_fall), .q(m13_q));

  // A11-B2: plot busy.
  always_ff @(posedge clk) begin
    if (!rst_n || m11_q)      plot_busy <= 1'b0;
    else if (nd_seek)         plot_busy <= 1'b1;
    else if (m13_fall && f1)  plot_busy <= 1'b0;
  end

  always_comb begin
    nd_enable    = f1;
    binary_sense = f1;
  end
endmodule
