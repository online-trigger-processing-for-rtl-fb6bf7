// trig_pkg: constants and types shared by the RPC-PET coincidence trigger.
//
// One time channel is sampled on three pads by a 500 MHz DDR clock whose three
// phases are 1/3 ns apart, giving one sample every ~333 ps. With a 250 MHz
// word clock every channel therefore delivers a 12-bit word per 4 ns cycle
// (3 pads x 2 edges x 2 bit-clock periods). In every word bit 0 is the oldest
// sample and bit 11 the newest. The counts of pads, channels, the window
// range and the counter limit follow the trigger system being modelled; the
// filter range (EF_MAX) and the field widths are this design's own choice.
package trig_pkg;

  localparam int unsigned PINS         = 3;   // pads per time channel
  localparam int unsigned BITS_PER_PIN = 4;   // DDR samples per pad per word
  localparam int unsigned WORD_W       = PINS * BITS_PER_PIN;  // 12
  localparam int unsigned N_NORTH      = 3;   // north time channels
  localparam int unsigned N_SOUTH      = 3;   // south time channels

  localparam int unsigned CW_MAX   = 4;       // window up to ~1.3 ns
  localparam int unsigned CW_W     = 3;       // width of cw_size
  localparam int unsigned EF_MAX   = 12;      // longest edge filter (4 ns)
  localparam int unsigned EF_W     = 4;       // width of e_filter

  localparam int unsigned STRETCH_CYCLES = 5;      // 4 ns trigger -> 20 ns
  localparam int unsigned CNT_W    = 15;      // characterisation counters
  localparam int unsigned CNT_MAX  = 32767;

  typedef logic [WORD_W-1:0] word_t;          // one 4 ns slice of samples

  // Clamp a programmed window size into 1..CW_MAX.
  function automatic int unsigned clamp_cw(input logic [CW_W-1:0] v);
    int unsigned u = int'(v);
    if (u == 0) return 1;
    if (u > CW_MAX) return CW_MAX;
    return u;
  endfunction

  // Clamp a programmed filter width into 1..EF_MAX.
  function automatic int unsigned clamp_ef(input logic [EF_W-1:0] v);
    int unsigned u = int'(v);
    if (u == 0) return 1;
    if (u > EF_MAX) return EF_MAX;
    return u;
  endfunction

endpackage
