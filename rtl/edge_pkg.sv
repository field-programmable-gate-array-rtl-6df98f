// edge_pkg: types and constants shared by the Sobel edge detection modules.
//
// Pixels are 8-bit grey levels (0..255). A 3x3 window is a packed array
// indexed [row][col]: row 0 is the oldest image line (top), col 0 the oldest
// column (left). The Sobel gradients of 8-bit pixels lie in -1020..+1020, so
// they fit an 11-bit signed value; the sum of their magnitudes fits 12 bits.
// The edge image is binary: background 0, edge 255.
package edge_pkg;
  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef pixel_t [2:0][2:0] window_t;
  typedef logic signed [10:0] grad_t;
  typedef logic [11:0] mag_t;

  localparam pixel_t PIX_EDGE = 8'd255;
  localparam pixel_t PIX_BG   = 8'd0;

  // Number of input pixels a frame of w x h needs to produce all w*h output
  // pixels: the window centre trails the input by two lines and one pixel.
  function automatic int unsigned frame_feed_len(int unsigned w, int unsigned h);
    return w * h + 2 * w + 1;
  endfunction
endpackage
