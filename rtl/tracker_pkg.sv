// tracker_pkg: types and constants shared by the adaptive feature-selection
// pipeline. Pixels are 8-bit intensities streamed in raster order (upper left
// corner first, left to right, then down one row). Configuration written by the
// processor (threshold, restoration enable, image size) travels to the pixel
// clock domain as one cfg_t word; the per-frame feature count travels back as
// one result_t word. Register offsets of the processor-side register file are
// byte addresses on a 32-bit bus.
//
// The 512 reset threshold is the fixed threshold the adaptive scheme is
// compared with; the 1280-pixel width is the widest image of the camera.
// The widths of the threshold and count fields and the 1024-row reset height
// are this design's choices.
package tracker_pkg;

  localparam int unsigned PIX_W = 8;   // bits per pixel
  localparam int unsigned DIM_W = 16;  // bits of an image width or height
  localparam int unsigned TH_W  = 16;  // bits of the feature threshold
  localparam int unsigned CNT_W = 21;  // bits of a per-frame feature count
  localparam int unsigned FNO_W = 16;  // bits of the frame number

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [DIM_W-1:0] dim_t;
  typedef logic [TH_W-1:0]  thresh_t;
  typedef logic [CNT_W-1:0] count_t;
  typedef logic [FNO_W-1:0] frame_no_t;

  // Everything the pixel pipeline needs from the processor, applied between frames.
  typedef struct packed {
    logic    restore_en;  // 1: restoration filter active, 0: pixels pass unchanged
    thresh_t thresh;      // feature selection threshold on the minimum eigenvalue
    dim_t    width;       // pixels per row
    dim_t    height;      // rows per frame
  } cfg_t;

  // Result of one frame, sent back to the processor.
  typedef struct packed {
    count_t    count;     // number of pixels declared features
    frame_no_t frame_no;  // frame number, wraps
  } result_t;

  localparam thresh_t RST_THRESH = thresh_t'(512);
  localparam dim_t    RST_WIDTH  = dim_t'(1280);
  localparam dim_t    RST_HEIGHT = dim_t'(1024);

  localparam cfg_t CFG_RESET = '{restore_en: 1'b0, thresh: RST_THRESH,
                                 width: RST_WIDTH, height: RST_HEIGHT};

  // Register map (byte offsets).
  localparam logic [7:0] REG_CTRL     = 8'h00;  // [0] restore_en                     RW
  localparam logic [7:0] REG_THRESH   = 8'h04;  // [15:0] threshold                   RW
  localparam logic [7:0] REG_IMG_SIZE = 8'h08;  // [15:0] width, [31:16] height       RW
  localparam logic [7:0] REG_COUNT    = 8'h0C;  // [20:0] feature count, last frame   RO
  localparam logic [7:0] REG_STATUS   = 8'h10;  // [15:0] frame number of that count,
                                                // [30] new count since last COUNT read,
                                                // [31] configuration not yet applied RO

endpackage
