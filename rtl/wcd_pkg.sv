// Shared types and constants of the Wronskian change detector.
//
// The detector compares each incoming video frame with the previously
// processed one. For every pixel pair (x = current, y = previous luminance)
// a pipelined processing element forms D(x,y) = r(r-1), r = x/y, in scaled
// 8-bit unsigned arithmetic; D values over a 3x3 neighbourhood of the same
// video field are summed and compared with an 8-bit threshold.
//
// Number formats (from the design description):
//   r      : 3.5 unsigned fixed point, 8 bits, saturated at 255 (7.97)
//   D      : (r_fix * (r_fix - 32)) >> 5, saturated at 255; one LSB of D is
//            1/32, so a 3x3 sum S relates to W = S / (32*9) and an 8-bit
//            threshold T corresponds to TH = T/288 (T = 173 -> TH = 0.6).
// Choices of this implementation: negative r-1 saturates to zero, so D is
// never negative; the window sum saturates at 255 before thresholding.
package wcd_pkg;

  // Fixed-point one in the 3.5 ratio format.
  localparam int unsigned RATIO_ONE = 32;

  // Which Wronskian drives the change decision.
  typedef enum logic [1:0] {
    MODE_W    = 2'd0,   // W(x/y): dark-zone changes
    MODE_WC   = 2'd1,   // conjugate W*(y/x): bright-zone changes
    MODE_BOTH = 2'd2    // either one detects a change
  } wcd_mode_t;

  // Main controller states.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_PROCESS = 2'd1,
    ST_DISPLAY = 2'd2
  } ctrl_state_t;

  // One luminance sample from the video decoder.
  typedef struct packed {
    logic       valid;  // sample present this cycle
    logic       sof;    // first sample of a field
    logic       field;  // field index: 0 = first field of a frame
    logic [7:0] luma;   // luminance, nominally 16..235
  } video_px_t;

endpackage
