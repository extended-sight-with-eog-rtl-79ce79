// menu: mode selection by gaze, and the menu screen.
//
// The display modes are the eye view (data visualization), the virtual world
// and the camera view. A long eye closure (the Closed state, which the
// feature detector reports only for closures well beyond a blink) returns the
// display to the menu from any mode. In the menu a case statement maps the
// gaze to a button: Left = eye view, Up = virtual world, Right = camera view.
// A button is selected after the gaze has stayed on it for DWELL_CYCLES clock
// cycles (about one second); a progress bar under the buttons shows the
// dwell and the gazed-at button is highlighted. Entering the menu by a long
// blink, the case-statement selection and the one-second dwell follow the
// design description. The button layout is this design's own, and the
// buttons are drawn as coloured rectangles rather than read from three
// stored 1024x768 menu pictures.
//
// Interface (clk = 65 MHz): eye_state, hcount/vcount; module_state (see
// eog_pkg; MS_MENU after reset); mpixel.
// Timing: mpixel belongs to the (hcount, vcount) presented 2 cycles earlier.
// The mode changes 1 + 1024*ceil(DWELL_CYCLES/1024) cycles after the gaze
// settles on a button, and one cycle after Closed appears outside the menu.
module menu #(
  parameter int unsigned DWELL_CYCLES = 65_000_000
) (
  input  logic                   clk,
  input  logic                   rst,
  input  eog_pkg::eye_state_t    eye_state,
  input  logic [10:0]            hcount,
  input  logic [9:0]             vcount,
  output eog_pkg::module_state_t module_state,
  output eog_pkg::pixel_t        mpixel
);
  import eog_pkg::*;

  // the dwell is counted as 1024 bar steps of TICK cycles each
  localparam int unsigned TICK = (DWELL_CYCLES + 1023) / 1024;
  localparam int unsigned TW   = (TICK > 1) ? $clog2(TICK) : 1;

  // button rectangles: {x0, x1, y0, y1}; 0 = eye view, 1 = virtual, 2 = camera
  localparam int BX0 [3] = '{64, 384, 704};
  localparam int BX1 [3] = '{320, 640, 960};
  localparam int BY0 [3] = '{320, 64, 320};
  localparam int BY1 [3] = '{448, 192, 448};
  localparam pixel_t BCOL [3] = '{12'h484, 12'h448, 12'h844};
  localparam pixel_t BHI  [3] = '{12'h8F8, 12'h88F, 12'hF88};

  logic [1:0]    gaze_btn;   // 3 = none
  logic [1:0]    cur_btn;
  logic [TW-1:0] tick_cnt;
  logic [10:0]   bar;        // 0..1024

  always_comb begin
    unique case (eye_state)
      EYE_LEFT:  gaze_btn = 2'd0;
      EYE_UP:    gaze_btn = 2'd1;
      EYE_RIGHT: gaze_btn = 2'd2;
      default:   gaze_btn = 2'd3;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      module_state <= MS_MENU;
      cur_btn      <= 2'd3;
      tick_cnt     <= '0;
      bar          <= '0;
    end else if (module_state != MS_MENU) begin
      cur_btn  <= 2'd3;
      tick_cnt <= '0;
      bar      <= '0;
      if (eye_state == EYE_CLOSED) module_state <= MS_MENU;
    end else begin
      if (gaze_btn != cur_btn) begin
        cur_btn  <= gaze_btn;
        tick_cnt <= '0;
        bar      <= '0;
      end else if (cur_btn != 2'd3) begin
        if (tick_cnt == TW'(TICK - 1)) begin
          tick_cnt <= '0;
          if (bar == 11'd1023) begin
            bar <= '0;
            cur_btn <= 2'd3;
            unique case (cur_btn)
              2'd0:    module_state <= MS_DATA;
              2'd1:    module_state <= MS_VIRTUAL;
              default: module_state <= MS_REAL;
            endcase
          end else begin
            bar <= bar + 1'b1;
          end
        end else begin
          tick_cnt <= tick_cnt + 1'b1;
        end
      end
    end
  end

  // stage 1: which screen element the pixel falls in
  logic [2:0] in_btn;
  logic       in_bar, in_track;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_btn   <= '0;
      in_bar   <= 1'b0;
      in_track <= 1'b0;
    end else begin
      for (int b = 0; b < 3; b++)
        in_btn[b] <= int'(hcount) >= BX0[b] && int'(hcount) < BX1[b] &&
                     int'(vcount) >= BY0[b] && int'(vcount) < BY1[b];
      in_track <= hcount < 11'(H_ACTIVE) && vcount >= 10'd600 && vcount < 10'd624;
      in_bar   <= hcount < bar && vcount >= 10'd600 && vcount < 10'd624;
    end
  end

  // stage 2: colour
  always_ff @(posedge clk) begin
    if (rst) mpixel <= '0;
    else begin
      mpixel <= 12'h000;
      if (in_bar)        mpixel <= 12'hFF0;
      else if (in_track) mpixel <= 12'h333;
      for (int b = 0; b < 3; b++)
        if (in_btn[b]) mpixel <= (cur_btn == 2'(b)) ? BHI[b] : BCOL[b];
    end
  end
endmodule
