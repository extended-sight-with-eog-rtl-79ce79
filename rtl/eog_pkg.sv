// eog_pkg: types and constants shared by the EOG viewer.
//
// The eye state is a one-hot 6-bit word. Its bit order follows the order in
// which the gaze classes are listed for the feature detector (Left, Right, Up,
// Down, Closed, Forward), so that bits [5:4] are the left/right pair that the
// motor controller reads. The display mode word, the 1024x768 screen size and
// the latency of the pixel generators are also defined here; the mode encoding
// and the latency are choices of this design.
package eog_pkg;

  // one-hot eye state bit positions
  localparam int unsigned ES_LEFT    = 5;
  localparam int unsigned ES_RIGHT   = 4;
  localparam int unsigned ES_UP      = 3;
  localparam int unsigned ES_DOWN    = 2;
  localparam int unsigned ES_CLOSED  = 1;
  localparam int unsigned ES_FORWARD = 0;

  typedef logic [5:0] eye_state_t;

  localparam eye_state_t EYE_LEFT    = 6'b100000;
  localparam eye_state_t EYE_RIGHT   = 6'b010000;
  localparam eye_state_t EYE_UP      = 6'b001000;
  localparam eye_state_t EYE_DOWN    = 6'b000100;
  localparam eye_state_t EYE_CLOSED  = 6'b000010;
  localparam eye_state_t EYE_FORWARD = 6'b000001;

  // display mode chosen by the menu
  typedef enum logic [1:0] {
    MS_MENU    = 2'd0,
    MS_DATA    = 2'd1,
    MS_VIRTUAL = 2'd2,
    MS_REAL    = 2'd3
  } module_state_t;

  typedef logic [11:0] pixel_t;  // 4:4:4 RGB

  // 1024x768 @ 60 Hz, 65 MHz pixel clock
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned H_FP     = 24;
  localparam int unsigned H_SYNC   = 136;
  localparam int unsigned H_BP     = 160;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP;  // 1344
  localparam int unsigned V_ACTIVE = 768;
  localparam int unsigned V_FP     = 3;
  localparam int unsigned V_SYNC   = 6;
  localparam int unsigned V_BP     = 29;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP;  // 806

  // clock cycles from (hcount, vcount) to the pixel of every generator
  localparam int unsigned PIXEL_LAT = 2;

  // camera frame
  localparam int unsigned CAM_W = 640;
  localparam int unsigned CAM_H = 480;

  // Gaze class of one filtered sample pair, by fixed cutoffs.
  // A large positive up/down excursion is taken as closed eyes.
  function automatic eye_state_t classify_gaze(
      input logic signed [7:0] lr, input logic signed [7:0] ud,
      input int th_h, input int th_v, input int th_closed);
    if (int'(ud) > th_closed)   return EYE_CLOSED;
    else if (int'(ud) > th_v)   return EYE_UP;
    else if (int'(ud) < -th_v)  return EYE_DOWN;
    else if (int'(lr) < -th_h)  return EYE_LEFT;
    else if (int'(lr) > th_h)   return EYE_RIGHT;
    else                        return EYE_FORWARD;
  endfunction

  function automatic logic signed [7:0] sat8(input int v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return 8'(v);
  endfunction

endpackage
