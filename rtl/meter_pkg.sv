// meter_pkg: constants and types shared by the frequency / time-period meter.
//
// The meter runs from a 20 MHz crystal clock. Times are measured in ticks of
// 1 us (0.001 ms, the meter's resolution) up to 1 s; frequency is counted over
// a 1 s gate, which gives the meter's +/-1 Hz accuracy over 1..99 Hz. These
// numbers are the meter's specification; the counter widths follow from them.
package meter_pkg;

  localparam int unsigned CLK_HZ     = 20_000_000;  // crystal
  localparam int unsigned TICK_HZ    = 1_000_000;   // 1 us resolution
  localparam int unsigned MAX_TICKS  = 1_000_000;   // 1 s full scale
  localparam int unsigned MAX_HZ     = 99;          // frequency full scale
  localparam int unsigned TIME_W     = 20;          // holds MAX_TICKS + 1
  localparam int unsigned FREQ_W     = 7;           // holds MAX_HZ + 1
  localparam int unsigned N_DIGITS   = 7;           // 1000000 has 7 digits

  // What the display shows; the mode button steps through them in order.
  typedef enum logic [1:0] {
    MODE_FREQ   = 2'd0,  // Hz
    MODE_PERIOD = 2'd1,  // us
    MODE_TON    = 2'd2,  // us
    MODE_TOFF   = 2'd3   // us
  } meter_mode_e;

endpackage
