// image_pkg: types and constants shared by the pixel-processing designs.
//
// A grey-scale image of 256 x 256 pixels, 8 bits per pixel, is streamed
// one pixel per clock from an image memory. The pseudo-coloring unit turns
// each grey pixel into an RGB triple (rgb_t); the negative unit turns it
// into 255 minus its value.
//
// HOT_TABLE is the 16-entry colour table of the pseudo-coloring unit, one
// entry per grey-level region. Four entries (regions 1, 2, 3 and 6) are the
// values this design was specified with; the other twelve are the 16-level
// HOT colour map (black -> red -> yellow -> white), each component computed
// as round(255 * v) with, for region k = 0..15 and n = 6 red steps:
//   red   v = min((k+1)/6, 1)
//   green v = min(max((k+1-6)/6, 0), 1)
//   blue  v = max((k+1-12)/4, 0)
// Replace the table (the color module takes it as a parameter) to use a
// different palette.
package image_pkg;

  parameter int unsigned PIX_W      = 8;        // bits per grey pixel
  parameter int unsigned IMG_W      = 256;      // image width in pixels
  parameter int unsigned IMG_H      = 256;      // image height in pixels
  parameter int unsigned IMG_PIXELS = IMG_W * IMG_H;  // 65536
  parameter int unsigned ADDR_W     = 17;       // address lines 16..0
  parameter int unsigned N_REGIONS  = 16;       // colour regions

  typedef logic [PIX_W-1:0] pixel_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef rgb_t color_table_t [N_REGIONS];

  parameter color_table_t HOT_TABLE = '{
    '{r:  43, g:   0, b:   0},   //  0: pixels   0..16
    '{r:  77, g:  11, b:  57},   //  1: pixels  17..32  (specified)
    '{r: 102, g:  31, b:  73},   //  2: pixels  33..48  (specified)
    '{r: 104, g:  22, b:  70},   //  3: pixels  49..64  (specified)
    '{r: 213, g:   0, b:   0},   //  4: pixels  65..80
    '{r: 255, g:   0, b:   0},   //  5: pixels  81..96
    '{r: 152, g:  83, b: 102},   //  6: pixels  97..112 (specified)
    '{r: 255, g:  85, b:   0},   //  7: pixels 113..128
    '{r: 255, g: 128, b:   0},   //  8: pixels 129..144
    '{r: 255, g: 170, b:   0},   //  9: pixels 145..160
    '{r: 255, g: 213, b:   0},   // 10: pixels 161..176
    '{r: 255, g: 255, b:   0},   // 11: pixels 177..192
    '{r: 255, g: 255, b:  64},   // 12: pixels 193..208
    '{r: 255, g: 255, b: 128},   // 13: pixels 209..224
    '{r: 255, g: 255, b: 191},   // 14: pixels 225..240
    '{r: 255, g: 255, b: 255}    // 15: pixels 241..255
  };

endpackage
