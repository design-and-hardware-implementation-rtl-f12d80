// Shared types and constants of the colour-coded radar display.
//
// The display stores a 256 x 512 matrix of 4-bit amplitude samples (azimuth
// segments x range samples) and shows it on a raster monitor with a sixteen
// colour code. Four samples share one 16-bit memory word. Colours leave the
// design as three 2-bit DAC codes, one per gun, in the form {MSB, LSB}:
// 00 gives 0 V, 01 gives v and 10 gives 2v (2v = full video, 1.4 V).
package radar_display_pkg;

  localparam int unsigned SAMPLES_PER_WORD = 4;

  // Operating mode, set by the addressing and timing block.
  typedef enum logic [1:0] {
    MODE_STOP  = 2'd0,   // operating switch high: nothing stored or shown
    MODE_WRITE = 2'd1,   // fresh samples are stored
    MODE_READ  = 2'd2    // stored samples are displayed
  } mode_t;

  // Which card feeds the 4-bit input of the memory interface.
  typedef enum logic [1:0] {
    SRC_ADC       = 2'd0,  // flash ADC encoder
    SRC_DIGITAL   = 2'd1,  // external digital data with its own sampling pulses
    SRC_TEST_CARD = 2'd2   // test pattern card
  } src_t;

  typedef logic [1:0] dac_code_t;

  typedef struct packed {
    dac_code_t b;
    dac_code_t g;
    dac_code_t r;
  } rgb_code_t;

  // DAC code of a gun for the ROM bit pair p, after the inverters that sit
  // between the ROM outputs and the DACs.
  function automatic dac_code_t rom_pair_to_dac(input logic [1:0] p);
    return ~p;
  endfunction

  // Converts the six used bits of a colour ROM word (B pair, G pair, R pair);
  // the two top bits of the 8-bit ROM word are unused.
  function automatic rgb_code_t rom_word_to_rgb(input logic [5:0] w);
    rgb_code_t c;
    c.b = rom_pair_to_dac(w[5:4]);
    c.g = rom_pair_to_dac(w[3:2]);
    c.r = rom_pair_to_dac(w[1:0]);
    return c;
  endfunction

endpackage
