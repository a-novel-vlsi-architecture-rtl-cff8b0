// hist_pkg: constants shared by the joint-histogram engine.
//
// The engine computes the joint histogram of two 8-bit images. Each pixel
// pair (a, b) is treated as one 16-bit datum {a, b}, so the histogram has
// 256 x 256 = 65536 bins. The image size (256 x 256) and the two pixel
// widths follow the evaluated configuration; the number of data held by one
// working unit (T) is not given and is chosen here as 8. The number of
// working units (U) was evaluated at 8 and 16; 16 is the default.
package hist_pkg;
  localparam int unsigned PIX_W      = 8;                 // bits per pixel of one image
  localparam int unsigned DATA_W     = 2 * PIX_W;         // pixel pair = histogram bin index
  localparam int unsigned UNITS      = 16;                // U, working units in the array
  localparam int unsigned PER_UNIT   = 8;                 // T, data per working unit
  localparam int unsigned IMG_PIXELS = 256 * 256;         // pixel pairs per image
  localparam int unsigned GROUPS     = IMG_PIXELS / PER_UNIT; // input memory words
  localparam int unsigned COUNT_W    = $clog2(IMG_PIXELS + 1); // widest bin count

  // Phase of the controller.
  typedef enum logic [2:0] {
    PH_IDLE,   // waiting for start
    PH_CLEAR,  // histogram memory being zeroed
    PH_FILL,   // t = 1: array being filled, no counting
    PH_RUN,    // counting; input memory still supplying groups
    PH_DRAIN,  // counting; empty groups shifted in behind the last data
    PH_FLUSH,  // array stopped, last updates leaving the bin pipeline
    PH_DONE    // histogram ready to read
  } phase_e;
endpackage
