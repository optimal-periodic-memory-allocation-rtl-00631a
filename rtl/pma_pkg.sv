// Shared types for the periodic-memory-allocation image processors.
//
// Pixels are 8-bit grey levels (256-level greyscale images, as in both
// example processors). The window register array uses a small enum to say
// how a freshly read line of pixels enters the window. The package holds
// no logic of its own.
package pma_pkg;

  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;

  // How a new line of E pixels enters an E x E window register array.
  //   SHIFT_HOLD   : no change
  //   SHIFT_BOTTOM : rows move up by one, the line becomes the bottom row
  //                  (window moved down by one pixel)
  //   SHIFT_TOP    : rows move down by one, the line becomes the top row
  //                  (window moved up by one pixel)
  //   SHIFT_RIGHT  : columns move left by one, the line becomes the right
  //                  column (window moved right by one pixel)
  typedef enum logic [1:0] {
    SHIFT_HOLD   = 2'd0,
    SHIFT_BOTTOM = 2'd1,
    SHIFT_TOP    = 2'd2,
    SHIFT_RIGHT  = 2'd3
  } shift_op_e;

endpackage
