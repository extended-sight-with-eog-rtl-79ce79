// tb_eog_top: end-to-end run of the whole viewer with a short delay line
// (256 samples), a short long-closure limit (64 samples), a short menu dwell
// (20000 cycles) and a large pan step (64 pixels). A generator plays the
// XADC conversions of scripted gazes (left/right and up/down levels, plus
// ground noise) at an accelerated rate, a camera model sends the first 40
// lines of a frame, and the virtual world is loaded with a coordinate
// pattern. The script: select the eye view by looking left, blink (must be
// ignored), close the eyes (back to the menu), select the virtual world by
// looking up and pan it across its top edge, go back, select the camera view
// by looking right and pan to the right limit so that the servo is driven,
// and close the eyes once more. A monitor checks chosen screen positions of
// every frame against the mode shown, and counts each mechanism; one that
// never happened is a failure.
module tb_eog_top;
  import eog_pkg::*;

  localparam int W = 2048, H = 1536, CAM_LINES = 40, STEP = 64;

  logic clk_104 = 0, clk_65 = 0, arst = 1;
  always #4.8 clk_104 = ~clk_104;
  always #7.7 clk_65 = ~clk_65;

  logic xadc_valid = 0;
  logic [1:0] xadc_chan = 0;
  logic signed [11:0] xadc_data = 0;
  logic cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [7:0] cam_data = 0;
  logic vw_load_we = 0;
  logic [21:0] vw_load_addr = 0;
  pixel_t vw_load_data = 0;
  pixel_t vga_rgb, rpixel;
  logic vga_hsync, vga_vsync, vga_blank, servo_pwm, motor_on;
  eye_state_t eye_state;
  module_state_t module_state;

  int checks = 0, failures = 0;

  eog_top #(.DEPTH_LOG2(8), .LONG_CLOSE(64), .DWELL_CYCLES(20000), .PAN_STEP(STEP)) dut (.*);

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, what);
  endtask

  // ---------------- XADC generator ----------------
  eye_state_t gaze = EYE_FORWARD;
  bit feed = 1;

  function automatic logic signed [11:0] conv(input int v8);
    return 12'((v8 << 4) | $urandom_range(0, 15));
  endfunction

  initial begin
    int l, u, g;
    @(negedge arst);
    forever begin
      repeat (5) @(posedge clk_104);
      if (feed) begin
        g = $urandom_range(0, 4) - 2;
        l = g; u = g;
        case (gaze)
          EYE_LEFT:   l = g - 40;
          EYE_RIGHT:  l = g + 40;
          EYE_UP:     u = g + 30;
          EYE_DOWN:   u = g - 30;
          EYE_CLOSED: u = g + 60;
          default: ;
        endcase
        xadc_valid <= 1; xadc_chan <= 0; xadc_data <= conv(g);
        @(posedge clk_104); xadc_chan <= 1; xadc_data <= conv(l);
        @(posedge clk_104); xadc_chan <= 2; xadc_data <= conv(u);
        @(posedge clk_104); xadc_valid <= 0;
      end
    end
  end

  // ---------------- camera model and picture loading ----------------
  function automatic pixel_t campat(input int a);
    return 12'((a * 5) ^ 12'h5A5);
  endfunction
  function automatic pixel_t vwpat(input int x, input int y);
    return 12'((x * 3) ^ (y * 7));
  endfunction

  initial begin
    @(negedge arst);
    #200 cam_vsync = 1;
    #1000 cam_vsync = 0;
    #1000;
    for (int a = 0; a < CAM_LINES * 640; a++) begin
      cam_href = 1;
      for (int b = 0; b < 2; b++) begin
        #31 cam_pclk = 0;
        cam_data = b ? campat(a)[7:0] : {4'h0, campat(a)[11:8]};
        #31 cam_pclk = 1;
      end
      if (a % 640 == 639) begin #62 cam_pclk = 0; cam_href = 0; #500; end
    end
  end

  initial begin
    @(negedge arst);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk_65);
        vw_load_we = 1; vw_load_addr = 22'(y * W + x); vw_load_data = vwpat(x, y);
      end
    @(negedge clk_65);
    vw_load_we = 0;
  end

  // ---------------- mechanism counters ----------------
  int n_adc = 0, n_filt = 0, n_blink = 0, n_sync = 0, n_closed = 0;
  int n_sel [4] = '{0, 0, 0, 0};
  int n_vwrap = 0, n_rclamp = 0, n_motor = 0, n_pwm_right = 0, n_camw = 0, n_frames = 0;
  int n_pix [4] = '{0, 0, 0, 0};

  always @(posedge clk_104) if (!dut.rst_104) begin
    if (dut.adc_ready) n_adc++;
    if (dut.flt_valid) n_filt++;
    if (dut.u_feature.tail_valid && dut.u_feature.tail_state == EYE_CLOSED &&
        !dut.u_feature.tail_in_long) n_blink++;
  end

  eye_state_t es_q = EYE_FORWARD;
  module_state_t ms_q = MS_MENU;
  logic [11:0] vy_q = 0;
  logic motor_q = 0;
  always @(posedge clk_65) if (!dut.rst_65) begin
    if (eye_state != es_q) begin
      n_sync++;
      if (eye_state == EYE_CLOSED) n_closed++;
    end
    es_q <= eye_state;
    if (module_state != ms_q) begin
      n_sel[module_state]++;
      $display("%0t mode %0d -> %0d (eye %b)", $time, ms_q, module_state, eye_state);
    end
    ms_q <= module_state;
    if (dut.u_virtual.off_y > 12'(H / 2) && vy_q == 0) n_vwrap++;
    vy_q <= 12'(dut.u_virtual.off_y);
    if (motor_on && !motor_q) n_motor++;
    motor_q <= motor_on;
    if (dut.fb_we) n_camw++;
    if (dut.hcount == 0 && dut.vcount == 768) n_frames++;
  end

  // PWM: pulse width 1.7 ms (right) seen while the motor is on
  initial begin
    longint t0;
    forever begin
      @(posedge servo_pwm); t0 = $time;
      @(negedge servo_pwm);
      if (($time - t0) > 110_400 * 15.4 && ($time - t0) < 110_600 * 15.4) n_pwm_right++;
    end
  end

  // ---------------- screen monitor ----------------
  int hq [4], vq [4];
  int stable = 0;
  initial begin
    int x, y, ox, oy;
    pixel_t want;
    bit chk;
    forever begin
      @(negedge clk_65);
      for (int i = 3; i > 0; i--) begin hq[i] = hq[i-1]; vq[i] = vq[i-1]; end
      hq[0] = int'(dut.hcount); vq[0] = int'(dut.vcount);
      stable = (eye_state == es_q && module_state == ms_q) ? stable + 1 : 0;
      x = hq[3]; y = vq[3];
      if (arst || stable < 8 || dut.rst_65) continue;
      chk = 0;
      want = 0;
      case (module_state)
        MS_MENU: if (x == 100 && y == 400) begin
          chk = 1; want = (vga_rgb == 12'h8F8) ? 12'h8F8 : 12'h484;
        end else if ((x == 10 || x == 900) && (y == 0 || y == 700)) begin chk = 1; want = 12'h000; end
        MS_DATA: if ((x == 0 || x == 1000) && (y == 0 || y == 384)) begin chk = 1; want = 12'h222; end
        else if (x == 352 && y == 384) begin
          chk = 1;
          want = (eye_state == EYE_FORWARD) ? 12'h036 : (eye_state == EYE_CLOSED) ? 12'hC96 : 12'hFFF;
        end
        MS_VIRTUAL: if ((x == 0 || x == 517 || x == 1023) && (y == 0 || y == 300 || y == 767)) begin
          ox = int'(dut.u_virtual.off_x); oy = int'(dut.u_virtual.off_y);
          chk = 1; want = vwpat((x + ox) % W, (y + oy) % H);
        end
        MS_REAL: if ((x == 0 || x == 201 || x == 1023) && (y == 0 || y == 31)) begin
          ox = int'(dut.u_real.off_x); oy = int'(dut.u_real.off_y);
          if ((y + oy) / 2 < CAM_LINES) begin
            chk = 1; want = campat(((y + oy) / 2) * 640 + (x + ox) / 2);
          end
        end
        default: ;
      endcase
      if (chk) begin
        checks++;
        n_pix[module_state]++;
        if (vga_rgb != want) fail($sformatf("mode %0d (%0d,%0d) rgb %h want %h", module_state, x, y, vga_rgb, want));
      end
    end
  end

  // ---------------- script ----------------

  task automatic hold_until_mode(input eye_state_t g, input module_state_t m, input string what);
    longint t0 = $time;
    gaze = g;
    while (module_state != m && ($time - t0) < 100_000_000) @(posedge clk_65);
    checks++;
    if (module_state != m) fail(what);
    gaze = EYE_FORWARD;
  endtask

  task automatic wait_frames(input int n);
    int f0 = n_frames;
    while (n_frames < f0 + n) @(posedge clk_65);
  endtask

  task automatic wait_samples(input int n);
    int s0 = n_filt;
    while (n_filt < s0 + n) @(posedge clk_104);
  endtask

  initial begin
    #100 arst = 0;
    // fill the delay line
    while (!dut.u_feature.filled) @(posedge clk_104);
    wait_samples(50);
    hold_until_mode(EYE_LEFT, MS_DATA, "eye view not selected");
    wait_samples(600);                       // eye state back to forward
    wait_frames(1);
    // a blink: 20 closed samples must not reach the menu
    gaze = EYE_CLOSED; wait_samples(50); gaze = EYE_FORWARD;
    wait_samples(600);
    checks++;
    if (module_state != MS_DATA) fail("blink left the eye view");
    // long closure back to the menu
    hold_until_mode(EYE_CLOSED, MS_MENU, "long closure did not open the menu");
    wait_samples(600);
    wait_frames(1);
    hold_until_mode(EYE_UP, MS_VIRTUAL, "virtual world not selected");
    // hold the gaze with the input stream paused, so that the high-pass
    // stage does not drift during the long hold
    gaze = EYE_UP; feed = 0; wait_frames(2); gaze = EYE_FORWARD; feed = 1;
    wait_samples(600);
    wait_frames(1);
    hold_until_mode(EYE_CLOSED, MS_MENU, "no return to menu from virtual world");
    wait_samples(600);
    hold_until_mode(EYE_RIGHT, MS_REAL, "camera view not selected");
    gaze = EYE_RIGHT; feed = 0;
    while (!motor_on) @(posedge clk_65);
    wait_frames(1);
    while (n_pwm_right == 0 && motor_on) @(posedge clk_65);
    gaze = EYE_FORWARD; feed = 1;
    wait_samples(600);
    wait_frames(1);
    hold_until_mode(EYE_CLOSED, MS_MENU, "no return to menu from camera view");
    wait_samples(600);

    $display("adc %0d filter %0d blink samples hidden %0d sync %0d closed %0d", n_adc, n_filt, n_blink, n_sync, n_closed);
    $display("selections data %0d virtual %0d real %0d menu %0d", n_sel[1], n_sel[2], n_sel[3], n_sel[0]);
    $display("virtual wraps %0d motor %0d pwm-right %0d camera writes %0d frames %0d", n_vwrap, n_motor, n_pwm_right, n_camw, n_frames);
    $display("pixel checks menu %0d data %0d virtual %0d real %0d", n_pix[0], n_pix[1], n_pix[2], n_pix[3]);
    checks += 14;
    if (n_adc == 0) fail("no ADC samples");
    if (n_filt == 0) fail("no filter outputs");
    if (n_blink == 0) fail("no blink replaced");
    if (n_sync == 0) fail("no state synchronized");
    if (n_closed == 0) fail("no long closure");
    if (n_sel[1] == 0 || n_sel[2] == 0 || n_sel[3] == 0) fail("a mode never selected");
    if (n_sel[0] < 3) fail("menu not re-entered three times");
    if (n_vwrap == 0) fail("virtual world never wrapped");
    if (n_motor == 0) fail("motor never switched on");
    if (n_pwm_right == 0) fail("no right-turn servo pulse");
    if (n_camw != CAM_LINES * 640) fail($sformatf("camera writes %0d", n_camw));
    for (int m = 0; m < 4; m++) if (n_pix[m] == 0) fail($sformatf("no pixel checked in mode %0d", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
