// stereo_pkg: constants and small types shared by the stereo depth pipeline.
//
// The pipeline works on 320 x 240 frames. Camera luminance arrives as 8-bit
// samples and is stored as 4-bit ("half byte") pixels in the left, right and
// average buffers; the disparity image is stored with 256 grey levels (8 bits).
// These sizes follow the design's memory budget. The window size and the
// disparity search range are this implementation's own choice.
package stereo_pkg;

  localparam int unsigned IMG_W_DEF    = 320;  // frame width in pixels
  localparam int unsigned IMG_H_DEF    = 240;  // frame height in lines
  localparam int unsigned CAM_W        = 8;    // camera bus / luminance width
  localparam int unsigned PIX_W        = 4;    // stored stereo pixel width
  localparam int unsigned DISP_W       = 8;    // stored disparity pixel width
  localparam int unsigned WIN_DEF      = 5;    // SSD window edge (odd)
  localparam int unsigned MAX_DISP_DEF = 32;   // disparities searched: 0..MAX_DISP-1

  // SCCB (I2C-compatible) write address of the OV7670 camera.
  localparam logic [7:0] OV7670_WR_ID = 8'h42;

  // One register write of the camera configuration table.
  typedef struct packed {
    logic [7:0] addr;
    logic [7:0] data;
  } sccb_reg_t;

endpackage
