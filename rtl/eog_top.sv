// eog_top: gaze-controlled viewer driven by an electro-oculogram (EOG).
//
// Two electrode pairs measure the eyes' left/right and up/down potentials;
// after external amplification the FPGA's XADC digitizes them. In the
// 104 MHz domain the adc_sampler down-samples to 62.5 kS/s, eog_filter
// conditions both channels and feature_detect turns them into a one-hot eye
// state (Left, Right, Up, Down, Closed, Forward), delayed about one second
// so that blinks can be removed. eye_state_sync moves the state into the
// 65 MHz graphics domain. There, xvga produces 1024x768 timing, four pixel
// generators (eye view, virtual world, camera view, menu) run in parallel and
// pixel_mux shows the one the menu has selected. camera_proc stores camera
// frames in frame_buffer for the camera view, which can also ask
// motor_control to pan the camera with a servo.
//
// The block structure and the two clock domains follow the design. Outside
// this module: the clock generator (clk_104 and clk_65 are inputs), the XADC
// (its conversions enter on xadc_*), the SD-card controller (the camera
// view's pixel stream is brought out on rpixel) and all analog and external
// parts. The virtual world's picture is loaded through vw_load_*.
//
// Reset: arst is asynchronous, active high, and is synchronized into each
// domain.
module eog_top #(
  parameter int unsigned DECIM        = 16,
  parameter int unsigned HPF_SHIFT    = 17,
  parameter int          FILTER_GAIN  = 2,
  parameter int unsigned DEPTH_LOG2   = 16,
  parameter int unsigned LONG_CLOSE   = 31250,
  parameter int unsigned DWELL_CYCLES = 65_000_000,
  parameter int unsigned VW_W         = 2048,
  parameter int unsigned VW_H         = 1536,
  parameter int unsigned PAN_STEP     = 8,
  parameter int unsigned PWM_PERIOD   = 1_300_000
) (
  input  logic                   clk_104,
  input  logic                   clk_65,
  input  logic                   arst,
  // XADC conversions (clk_104)
  input  logic                   xadc_valid,
  input  logic [1:0]             xadc_chan,
  input  logic signed [11:0]     xadc_data,
  // camera (asynchronous)
  input  logic                   cam_pclk,
  input  logic                   cam_href,
  input  logic                   cam_vsync,
  input  logic [7:0]             cam_data,
  // virtual world picture loading (clk_65)
  input  logic                   vw_load_we,
  input  logic [$clog2(VW_W*VW_H)-1:0] vw_load_addr,
  input  eog_pkg::pixel_t        vw_load_data,
  // monitor
  output eog_pkg::pixel_t        vga_rgb,
  output logic                   vga_hsync,
  output logic                   vga_vsync,
  output logic                   vga_blank,
  // servo
  output logic                   servo_pwm,
  // to the SD-card controller: camera view pixels
  output eog_pkg::pixel_t        rpixel,
  // status
  output eog_pkg::eye_state_t    eye_state,
  output eog_pkg::module_state_t module_state,
  output logic                   motor_on
);
  import eog_pkg::*;

  logic rst_104, rst_65;
  reset_sync u_rs104 (.clk(clk_104), .arst_in(arst), .rst_out(rst_104));
  reset_sync u_rs65  (.clk(clk_65),  .arst_in(arst), .rst_out(rst_65));

  // ---------------- EOG processing, 104 MHz ----------------
  logic              adc_ready;
  logic signed [7:0] adc_gnd, adc_lr, adc_ud;

  adc_sampler #(.DECIM(DECIM)) u_adc (
    .clk(clk_104), .rst(rst_104),
    .in_valid(xadc_valid), .in_chan(xadc_chan), .in_data(xadc_data),
    .gnd(adc_gnd), .lr(adc_lr), .ud(adc_ud), .ready(adc_ready));

  logic              flt_valid;
  logic signed [7:0] flt_lr, flt_ud;

  eog_filter #(.HPF_SHIFT(HPF_SHIFT), .GAIN(FILTER_GAIN)) u_filter (
    .clk(clk_104), .rst(rst_104),
    .in_valid(adc_ready), .gnd(adc_gnd), .lr(adc_lr), .ud(adc_ud),
    .out_valid(flt_valid), .lr_f(flt_lr), .ud_f(flt_ud));

  eye_state_t eye_state_104;
  logic       fd_valid;

  feature_detect #(.DEPTH_LOG2(DEPTH_LOG2), .LONG_CLOSE(LONG_CLOSE)) u_feature (
    .clk(clk_104), .rst(rst_104),
    .in_valid(flt_valid), .lr(flt_lr), .ud(flt_ud),
    .eye_state(eye_state_104), .out_valid(fd_valid));

  eye_state_sync u_sync (
    .src_clk(clk_104), .src_rst(rst_104), .src_state(eye_state_104),
    .dst_clk(clk_65),  .dst_rst(rst_65),  .dst_state(eye_state));

  // ---------------- graphics generation, 65 MHz ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga u_xvga (
    .clk(clk_65), .rst(rst_65),
    .hcount, .vcount, .hsync, .vsync, .blank);

  pixel_t dpixel, vpixel, mpixel;

  data_vis u_data_vis (
    .clk(clk_65), .rst(rst_65), .eye_state, .hcount, .vcount, .dpixel);

  virtual_world #(.IMG_W(VW_W), .IMG_H(VW_H), .STEP(PAN_STEP)) u_virtual (
    .clk(clk_65), .rst(rst_65), .eye_state, .hcount, .vcount,
    .load_we(vw_load_we), .load_addr(vw_load_addr), .load_data(vw_load_data),
    .vpixel);

  logic [18:0] fb_raddr, fb_waddr;
  logic        fb_we;
  pixel_t      fb_rdata, fb_wdata;

  real_world #(.STEP(PAN_STEP)) u_real (
    .clk(clk_65), .rst(rst_65), .eye_state, .hcount, .vcount,
    .fb_addr(fb_raddr), .fb_data(fb_rdata), .rpixel, .motor_on);

  menu #(.DWELL_CYCLES(DWELL_CYCLES)) u_menu (
    .clk(clk_65), .rst(rst_65), .eye_state, .hcount, .vcount,
    .module_state, .mpixel);

  pixel_mux u_mux (
    .clk(clk_65), .rst(rst_65), .module_state,
    .dpixel, .vpixel, .rpixel, .mpixel,
    .hsync, .vsync, .blank,
    .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank);

  // ---------------- camera and motor, 65 MHz ----------------
  logic [23:0] cam_pixel;
  logic        cam_pixel_valid, cam_href_s, cam_vsync_s;

  camera_proc u_camera (
    .clk(clk_65), .rst(rst_65),
    .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .fb_we, .fb_addr(fb_waddr), .fb_wdata,
    .pixel(cam_pixel), .pixel_valid(cam_pixel_valid),
    .href(cam_href_s), .vsync(cam_vsync_s));

  frame_buffer u_fb (
    .clk(clk_65), .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr(fb_raddr), .rdata(fb_rdata));

  motor_control #(.PERIOD(PWM_PERIOD)) u_motor (
    .clk(clk_65), .rst(rst_65), .lr(eye_state[5:4]), .motor_on, .pwm(servo_pwm));

endmodule
