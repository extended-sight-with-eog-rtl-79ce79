// virtual_world: a window onto a stored panorama that the gaze scrolls.
//
// The panorama is IMG_W x IMG_H 12-bit pixels in on-chip memory; the default
// 2048 x 1536 holds 4 x (1024 x 768) pixels. The screen shows the 1024x768
// window whose top-left corner is (off_x, off_y). Once per frame, while the
// eye state is Left/Right/Up/Down, the window moves STEP pixels that way, so
// the distance scrolled grows with the time spent looking. Both offsets wrap
// around the panorama edges, which gives the all-round view of a scene that
// closes on itself. The stored-image approach, its size in pixels and the
// incremental movement follow the design description; the 2x2 arrangement of
// the four screens, STEP and the load port are this design's own. The image
// is written through the load port (it is pre-generated elsewhere).
//
// Interface (clk = 65 MHz): eye_state, hcount/vcount; load_we/load_addr/
// load_data (address = y*IMG_W + x); vpixel.
// Timing: vpixel belongs to the (hcount, vcount) presented 2 cycles earlier
// (address stage, memory read stage). Offsets update at the first blank line
// (vcount = 768, hcount = 0).
module virtual_world #(
  parameter int unsigned IMG_W = 2048,
  parameter int unsigned IMG_H = 1536,
  parameter int unsigned STEP  = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  eog_pkg::eye_state_t eye_state,
  input  logic [10:0]         hcount,
  input  logic [9:0]          vcount,
  input  logic                load_we,
  input  logic [$clog2(IMG_W*IMG_H)-1:0] load_addr,
  input  eog_pkg::pixel_t     load_data,
  output eog_pkg::pixel_t     vpixel
);
  import eog_pkg::*;

  localparam int unsigned AW = $clog2(IMG_W * IMG_H);
  localparam int unsigned XW = $clog2(IMG_W) + 1;
  localparam int unsigned YW = $clog2(IMG_H) + 1;

  pixel_t img [IMG_W * IMG_H];

  logic [XW-1:0] off_x;
  logic [YW-1:0] off_y;
  logic          frame_tick;

  assign frame_tick = (hcount == '0) && (vcount == 10'(V_ACTIVE));

  // offset update with wrap-around
  always_ff @(posedge clk) begin
    if (rst) begin
      off_x <= '0;
      off_y <= '0;
    end else if (frame_tick) begin
      unique case (eye_state)
        EYE_LEFT:  off_x <= (off_x < XW'(STEP)) ? off_x + XW'(IMG_W - STEP) : off_x - XW'(STEP);
        EYE_RIGHT: off_x <= (off_x + XW'(STEP) >= XW'(IMG_W)) ? off_x + XW'(STEP) - XW'(IMG_W)
                                                            : off_x + XW'(STEP);
        EYE_UP:    off_y <= (off_y < YW'(STEP)) ? off_y + YW'(IMG_H - STEP) : off_y - YW'(STEP);
        EYE_DOWN:  off_y <= (off_y + YW'(STEP) >= YW'(IMG_H)) ? off_y + YW'(STEP) - YW'(IMG_H)
                                                            : off_y + YW'(STEP);
        default: ;
      endcase
    end
  end

  // stage 1: wrapped image coordinates -> address
  logic [XW+11:0] sx;
  logic [YW+10:0] sy;
  logic [XW-1:0]  ix;
  logic [YW-1:0]  iy;
  logic [AW-1:0]  rd_addr;

  always_comb begin
    sx = (XW+12)'(off_x) + (XW+12)'(hcount);
    sy = (YW+11)'(off_y) + (YW+11)'(vcount);
    // hcount < 1344 and vcount < 806 can exceed the image once at most
    // when the image is at least as large as the screen
    ix = (sx >= (XW+12)'(IMG_W)) ? XW'(sx - (XW+12)'(IMG_W)) : XW'(sx);
    iy = (sy >= (YW+11)'(IMG_H)) ? YW'(sy - (YW+11)'(IMG_H)) : YW'(sy);
  end

  always_ff @(posedge clk) begin
    if (rst) rd_addr <= '0;
    else if (ix < XW'(IMG_W) && iy < YW'(IMG_H))
      rd_addr <= AW'(iy) * AW'(IMG_W) + AW'(ix);
    else
      rd_addr <= '0;
  end

  // stage 2: image memory (write port for loading, registered read)
  always_ff @(posedge clk) begin
    if (load_we) img[load_addr] <= load_data;
    vpixel <= img[rd_addr];
  end
endmodule
