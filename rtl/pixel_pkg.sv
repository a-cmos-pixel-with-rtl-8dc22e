// pixel_pkg: constants and the global control bundle shared by the digital
// pixel, the gain-correction circuit and the frame sequencer.
//
// The pixel counter is a 9-bit reversible LFSR (511 states, the all-zero word
// never occurs). Its feedback polynomial is this design's choice,
// x^9 + x^5 + 1, a maximal-length polynomial that needs one XOR per counting
// direction. The RAMP is a 12-bit DAC code; one code is 1.8 V / 4096.
// pix_ctrl_t carries every global line that runs through the array: the
// two-phase counter clocks (PHI1UP and PHI1DOWN are active low, as drawn in
// the pixel schematic), CNT_EN, CNT_FORCE, RST, the light-to-voltage
// converter controls RSTA, PG and TG, and the RAMP code.
package pixel_pkg;

  localparam int NBITS     = 9;   // counter / ADC word
  localparam int RAMP_BITS = 12;  // RAMP DAC resolution
  localparam int LFSR_TAP  = 4;   // up feedback: bit0 <= bit8 ^ bit4

  typedef logic [NBITS-1:0]     pix_word_t;
  typedef logic [RAMP_BITS-1:0] ramp_t;

  typedef struct packed {
    logic  rsta;        // sense-node reset
    logic  pg;          // photogate on (integrating)
    logic  tg;          // transfer gate
    logic  cnt_en;      // CNT_EN (global)
    logic  cnt_force;   // CNT_FORCE: count regardless of comparator
    logic  rst;         // RST of the first counter register
    logic  phi1up_n;    // up clock, active low
    logic  phi1down_n;  // down clock, active low
    logic  phi2;        // second phase, active high
    ramp_t ramp;        // RAMP DAC code
  } pix_ctrl_t;

endpackage
