// hist_pkg: constants and types shared by the two-way parallel histogram unit.
//
// The default image is 128 x 128 pixels of 8-bit grey level (16384 pixels, 256 grey
// levels), the configuration the design is sized for. The count width is this
// design's own choice: just wide enough that one bin can hold every pixel of the
// image (a uniform image puts all 16384 pixels in one bin, which needs 15 bits).
// The controller walks through the states of hist_state_e; a pixel pair costs
// three clock cycles (image read, histogram read, histogram write).
package hist_pkg;

  localparam int unsigned DEF_IMG_W  = 128;   // image width in pixels
  localparam int unsigned DEF_IMG_H  = 128;   // image height in pixels
  localparam int unsigned DEF_PIX_W  = 8;     // bits per pixel (grey level 0..255)

  // Number of bits needed to count up to n (inclusive).
  function automatic int unsigned count_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start; external port owns the memories
    ST_CLEAR   = 3'd1,  // zero two histogram bins per cycle
    ST_RD_IMG  = 3'd2,  // present even/odd pixel addresses to the image memory
    ST_RD_HIST = 3'd3,  // pixel pair valid: present it as histogram addresses
    ST_WR_HIST = 3'd4,  // old counts valid: write back the incremented counts
    ST_DONE    = 3'd5   // one-cycle completion pulse
  } hist_state_e;

endpackage
