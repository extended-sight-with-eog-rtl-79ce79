// real_world: gaze-steered view of the camera picture.
//
// The 640x480 camera frame is shown enlarged 2x in both directions
// (1280x960), of which the 1024x768 screen shows a window at offset
// (off_x, off_y). Once per frame, while the eye state is Left/Right/Up/Down,
// the window moves STEP screen pixels that way, clamped to 0..256
// horizontally and 0..192 vertically. When the wearer keeps looking left or
// right with the window already at that edge, motor_on asks the servo to pan
// the camera itself. For each screen pixel the frame-buffer address is
// ((vcount+off_y)/2)*640 + (hcount+off_x)/2. The offsets, the 2x scaling and
// the boundary comparisons follow the design description; STEP and the rule
// for motor_on are this design's own.
//
// Interface (clk = 65 MHz): eye_state, hcount/vcount; fb_addr/fb_data to the
// frame buffer's read port (one-cycle registered read); rpixel; motor_on.
// Timing: rpixel belongs to the (hcount, vcount) presented 2 cycles earlier.
// Offsets and motor_on update at the first blank line.
module real_world #(
  parameter int unsigned STEP = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  eog_pkg::eye_state_t eye_state,
  input  logic [10:0]         hcount,
  input  logic [9:0]          vcount,
  output logic [18:0]         fb_addr,
  input  eog_pkg::pixel_t     fb_data,
  output eog_pkg::pixel_t     rpixel,
  output logic                motor_on
);
  import eog_pkg::*;

  localparam int unsigned MAX_X = 2 * CAM_W - H_ACTIVE;  // 256
  localparam int unsigned MAX_Y = 2 * CAM_H - V_ACTIVE;  // 192

  logic [10:0] off_x;
  logic [9:0]  off_y;
  logic        frame_tick;

  assign frame_tick = (hcount == '0) && (vcount == 10'(V_ACTIVE));

  always_ff @(posedge clk) begin
    if (rst) begin
      off_x    <= '0;
      off_y    <= '0;
      motor_on <= 1'b0;
    end else if (frame_tick) begin
      motor_on <= 1'b0;
      unique case (eye_state)
        EYE_LEFT: begin
          off_x    <= (off_x > 11'(STEP)) ? off_x - 11'(STEP) : '0;
          motor_on <= (off_x == '0);
        end
        EYE_RIGHT: begin
          off_x    <= (off_x + 11'(STEP) < 11'(MAX_X)) ? off_x + 11'(STEP) : 11'(MAX_X);
          motor_on <= (off_x == 11'(MAX_X));
        end
        EYE_UP:   off_y <= (off_y > 10'(STEP)) ? off_y - 10'(STEP) : '0;
        EYE_DOWN: off_y <= (off_y + 10'(STEP) < 10'(MAX_Y)) ? off_y + 10'(STEP) : 10'(MAX_Y);
        default: ;
      endcase
    end
  end

  // stage 1: address of the camera pixel under this screen pixel
  logic [10:0] cx;
  logic [9:0]  cy;
  assign cx = (hcount + off_x) >> 1;
  assign cy = 10'((11'(vcount) + 11'(off_y)) >> 1);

  always_ff @(posedge clk) begin
    if (rst) fb_addr <= '0;
    else if (hcount < 11'(H_ACTIVE) && vcount < 10'(V_ACTIVE))
      fb_addr <= 19'(cy) * 19'(CAM_W) + 19'(cx);
    else
      fb_addr <= '0;
  end

  // stage 2: the frame buffer's registered read
  assign rpixel = fb_data;
endmodule
