// Shared widths, constants and the modulation-type encoding of the SSB
// modulator. The accumulator width (24), the ROM size (8192 x 8), the
// product width (16), the scaling divisor (255) and the 128 offset are the
// design's published numbers; the numeric encoding of the modulation type is
// this implementation's own choice.
package ssb_pkg;

  // Phase accumulator width: delta_f = F_CLK / 2^24 ~ 3 Hz at 50 MHz.
  localparam int unsigned ACC_W    = 24;
  // ROM address width: 8192 words per full period.
  localparam int unsigned ADDR_W   = 13;
  // Sample width: ROM words are 0..255.
  localparam int unsigned SAMPLE_W = 8;
  // Width of the signed products and of the sideband sums.
  localparam int unsigned PROD_W   = 16;
  // Scaling constants: sum / 255 + 128.
  localparam int unsigned SCALE_DIVISOR = 255;
  localparam int unsigned SAMPLE_OFFSET = 128;
  // Amplitude of the stored wave around the 128 mid-scale.
  localparam int unsigned ROM_AMPLITUDE = 127;

  // Modulation type, TYPE_MOD[1:0].
  typedef enum logic [1:0] {
    MOD_LSB  = 2'd0,   // lower sideband only
    MOD_USB  = 2'd1,   // upper sideband only
    MOD_DSB  = 2'd2,   // LSB + USB
    MOD_DSB3 = 2'd3    // unused code, treated as LSB + USB
  } type_mod_e;

endpackage
