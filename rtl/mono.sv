// mono: monostable multivibrator built as a down-counter.
//
// A rising edge on trig starts a pulse on q that lasts exactly WIDTH clock
// cycles, beginning in the cycle after the edge is seen.  With RETRIG = 0 the
// mono behaves like a plain one-shot and ignores edges while its pulse runs;
// with RETRIG = 1 every new edge restarts the full width, as a retriggerable
// 9601-type mono does.  The analog RC timing of the original parts is replaced
// by counting clock cycles; the caller converts microseconds to cycles.
// A WIDTH of 0 gives no pulse.  rst_n is synchronous and active low.
module mono #(
  parameter int unsigned WIDTH  = 10,
  parameter bit          RETRIG = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic q
);
  localparam int unsigned CW = (WIDTH < 2) ? 1 : $clog2(WIDTH + 1);

  logic          trig_d;
  logic [CW-1:0] count;
  logic          edge_seen;

  assign edge_seen = trig && !trig_d;
  assign q = (count != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_d <= 1'b0;
      count  <= '0;
    end else begin
      trig_d <= trig;
      if (edge_seen && (RETRIG || count == '0))
        count <= CW'(WIDTH);
      else if (count != '0)
        count <= count - 1'b1;
    end
  end
endmodule
