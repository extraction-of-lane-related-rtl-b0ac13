// lane_pkg: types and constants shared by the lane-information onboard
// image processing system.
//
// The frame is the 320x240 region of interest that the system processes
// (two interlaced fields of 120 lines each). Pixels are 8-bit intensities.
// Sobel gradients span -1020..1020 and are carried as 11-bit two's
// complement numbers; the magnitude |Gx|+|Gy| is carried on 16 bits as the
// magnitude calculator output is drawn (MAG[15:0]). The orientation is an
// integer number of degrees in -90..90 taken from the arctangent ROM.
//
// lut_addr() forms the 20-bit ROM address: bits 8:0 hold |Gx|/2, bit 9 the
// sign of Gx, bits 18:10 hold |Gy|/2 and bit 19 the sign of Gy. Halving
// maps the gradient range -1020..1020 onto -512..512 so that one 1 Mbyte
// ROM covers it.
package lane_pkg;

  localparam int IMG_W  = 320;  // pixels per line of the processed frame
  localparam int IMG_H  = 240;  // lines per frame (two fields)
  localparam int PIX_W  = 8;    // intensity bits
  localparam int GRAD_W = 11;   // signed Sobel gradient bits (-1020..1020)
  localparam int MAG_W  = 16;   // magnitude bits
  localparam int ANG_W  = 8;    // signed orientation in degrees
  localparam int LUT_AW = 20;   // orientation ROM address bits (1 Mbyte)

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;
  typedef logic signed [ANG_W-1:0]  ang_t;

  // One 3x3 neighbourhood, element i is Z(i+1) of the Sobel window.
  typedef pix_t [8:0] window_t;

  // Edge features delivered for one pixel (the window centre Z5).
  typedef struct packed {
    pix_t pix;      // intensity of the centre pixel
    mag_t mag;      // |Gx| + |Gy|
    ang_t ang;      // round(atan(Gx/Gy)) in degrees, -90..90
    logic gx_neg;   // sign of Gx
    logic gy_neg;   // sign of Gy
  } edge_feat_t;

  // 20-bit orientation ROM address for a gradient pair.
  function automatic logic [LUT_AW-1:0] lut_addr(grad_t gx, grad_t gy);
    logic [GRAD_W-1:0] ax, ay;
    ax = gx[GRAD_W-1] ? GRAD_W'(-gx) : GRAD_W'(gx);
    ay = gy[GRAD_W-1] ? GRAD_W'(-gy) : GRAD_W'(gy);
    return {gy[GRAD_W-1], ay[9:1], gx[GRAD_W-1], ax[9:1]};
  endfunction

endpackage
