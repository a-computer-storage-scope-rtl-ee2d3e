// scope_pkg: types and constants shared by the storage-scope display interface.
//
// The computer drives the interface through an 8-bit control word held in a
// stored output module.  Bit meanings follow the interface's control word:
// bit 0 settle delay always, 1 write thru, 2 non store, 3 strobe address (X),
// 4 erase, 5 end plot pulse, 6 intensity address 0, 7 intensity address 1.
// The packed struct below lays these out so that ctrl_t'(byte) gives each bit
// its name.  The time base (clock cycles per microsecond) is this design's
// own choice: the original circuit times everything with analog monostables.
package scope_pkg;

  typedef struct packed {
    logic [1:0] int_addr;       // bits 7:6, intensity address 1:0
    logic       end_plot;       // bit 5
    logic       erase;          // bit 4
    logic       strobe_addr_x;  // bit 3, 1 = X strobe plots the point
    logic       non_store;      // bit 2
    logic       write_thru;     // bit 1
    logic       settle_always;  // bit 0
  } ctrl_t;

  // Default clock: 10 cycles per microsecond (10 MHz).
  localparam int unsigned DEFAULT_TICKS_PER_US = 10;

  // Front-panel LED order.
  typedef enum logic [3:0] {
    LED_SETTLE   = 4'd0,
    LED_WTHRU    = 4'd1,
    LED_NSTORE   = 4'd2,
    LED_XPOINT   = 4'd3,
    LED_ENDPLOT  = 4'd4,
    LED_ERASE    = 4'd5,
    LED_INT1     = 4'd6,
    LED_INT2     = 4'd7,
    LED_XSTROBE  = 4'd8,
    LED_YSTROBE  = 4'd9,
    LED_READY    = 4'd10
  } led_e;

  localparam int unsigned NUM_LEDS = 11;

endpackage
