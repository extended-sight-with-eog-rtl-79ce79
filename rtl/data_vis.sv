// data_vis: draws the wearer's eye state as a pair of cartoon eyes.
//
// Two white circles (radius EYE_R) sit side by side on a dark background; a
// dark pupil (radius PUPIL_R) inside each is moved PUPIL_OFS pixels toward
// the direction the eye state reports (left, right, up, down, or centred for
// forward). When the state is Closed the eyes are drawn as lids with no
// pupil. As described for this block, a case statement turns the eye state
// into pupil centres and every pixel is tested against the circles, the test
// being split over two pipeline stages (differences, then squares and
// compare). Sizes, positions and colours are this design's own.
//
// Interface (clk = 65 MHz): eye_state, hcount/vcount from the timing
// generator; dpixel is the 12-bit colour.
// Timing: dpixel belongs to the (hcount, vcount) presented PIXEL_LAT = 2
// cycles earlier.
module data_vis #(
  parameter int EYE_R     = 120,
  parameter int PUPIL_R   = 40,
  parameter int PUPIL_OFS = 60,
  parameter int EYE_Y     = 384,
  parameter int EYE0_X    = 352,
  parameter int EYE1_X    = 672
) (
  input  logic                clk,
  input  logic                rst,
  input  eog_pkg::eye_state_t eye_state,
  input  logic [10:0]         hcount,
  input  logic [9:0]          vcount,
  output eog_pkg::pixel_t     dpixel
);
  import eog_pkg::*;

  localparam pixel_t C_BG    = 12'h222;
  localparam pixel_t C_WHITE = 12'hFFF;
  localparam pixel_t C_PUPIL = 12'h036;
  localparam pixel_t C_LID   = 12'hC96;

  // pupil displacement from the eye state
  logic signed [11:0] pdx, pdy;
  always_comb begin
    pdx = '0;
    pdy = '0;
    unique case (eye_state)
      EYE_LEFT:  pdx = -12'(PUPIL_OFS);
      EYE_RIGHT: pdx =  12'(PUPIL_OFS);
      EYE_UP:    pdy = -12'(PUPIL_OFS);
      EYE_DOWN:  pdy =  12'(PUPIL_OFS);
      default: ;
    endcase
  end

  // stage 1: differences to the eye and pupil centres
  logic signed [11:0] ex [2], ey, px [2], py;
  logic               closed1;

  always_ff @(posedge clk) begin
    if (rst) begin
      ex[0] <= '0; ex[1] <= '0; px[0] <= '0; px[1] <= '0;
      ey <= '0; py <= '0; closed1 <= 1'b0;
    end else begin
      ex[0]   <= $signed({1'b0, hcount}) - 12'(EYE0_X);
      ex[1]   <= $signed({1'b0, hcount}) - 12'(EYE1_X);
      ey      <= $signed({2'b0, vcount}) - 12'(EYE_Y);
      px[0]   <= $signed({1'b0, hcount}) - 12'(EYE0_X) - pdx;
      px[1]   <= $signed({1'b0, hcount}) - 12'(EYE1_X) - pdx;
      py      <= $signed({2'b0, vcount}) - 12'(EYE_Y) - pdy;
      closed1 <= (eye_state == EYE_CLOSED);
    end
  end

  // stage 2: inside-circle tests and colour
  function automatic logic in_circle(input logic signed [11:0] dx,
                                     input logic signed [11:0] dy, input int r);
    logic signed [24:0] wx, wy;
    wx = 25'(dx);
    wy = 25'(dy);
    return (wx * wx + wy * wy) < 25'(r * r);
  endfunction

  logic in_eye, in_pupil;
  assign in_eye   = in_circle(ex[0], ey, EYE_R) || in_circle(ex[1], ey, EYE_R);
  assign in_pupil = in_circle(px[0], py, PUPIL_R) || in_circle(px[1], py, PUPIL_R);

  always_ff @(posedge clk) begin
    if (rst) dpixel <= C_BG;
    else if (!in_eye)      dpixel <= C_BG;
    else if (closed1)      dpixel <= C_LID;
    else if (in_pupil)     dpixel <= C_PUPIL;
    else                   dpixel <= C_WHITE;
  end
endmodule
