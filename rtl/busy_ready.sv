// busy_ready: the busy/ready level returned to the computer's output modules.
//
// The interface is busy while any of four things is in progress: the delay
// before a point is stored (settle or short delay), the store-Z pulse itself,
// the storage scope's erase interval, or the plotter plotting a point.  While
// busy the output modules hold their data, which prevents data overrun.  The
// "busy disable" switch forces the level to ready as a bail-out when the
// computer or interface hangs.  Positive logic here: ready = 1 means ready
// (the original drives an active-low busy).  Combinational.
module busy_ready (
  input  logic delay,
  input  logic store_z,
  input  logic scope_erasing,
  input  logic plot_busy,
  input  logic busy_disable,
  output logic ready
);
  logic busy;
  always_comb begin
    busy  = delay || store_z || scope_erasing || plot_busy;
    ready = !busy || busy_disable;
  end
endmodule
