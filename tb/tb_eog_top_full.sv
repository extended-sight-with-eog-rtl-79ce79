// tb_eog_top_full: one complete operation of the viewer at its full size
// (64k-sample delay line, one-second menu dwell, 2048x1536 panorama, 20 ms
// servo period). XADC conversions of a forward gaze fill the delay line, then
// a left gaze is fed until the eye state turns Left, after which the input
// pauses so the state holds for the one-second dwell. The menu must switch
// to the eye view, and one whole frame of the monitor output is then compared
// pixel by pixel with a model of the two eyes looking left.
module tb_eog_top_full;
  import eog_pkg::*;

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

  eog_top dut (.*);

  initial begin
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  eye_state_t gaze = EYE_FORWARD;
  bit feed = 1;
  int n_samples = 0;

  always @(posedge clk_104) if (!dut.rst_104 && dut.flt_valid) n_samples++;

  initial begin
    int l, g;
    @(negedge arst);
    forever begin
      repeat (5) @(posedge clk_104);
      if (feed) begin
        g = $urandom_range(0, 4) - 2;
        l = (gaze == EYE_LEFT) ? g - 40 : g;
        xadc_valid <= 1; xadc_chan <= 0; xadc_data <= 12'(g << 4);
        @(posedge clk_104); xadc_chan <= 1; xadc_data <= 12'(l << 4);
        @(posedge clk_104); xadc_chan <= 2; xadc_data <= 12'(g << 4);
        @(posedge clk_104); xadc_valid <= 0;
      end
    end
  end

  function automatic pixel_t eyes_left(input int x, input int y);
    int cx [2] = '{352, 672};
    bit eye = 0, pupil = 0;
    for (int e = 0; e < 2; e++) begin
      if ((x - cx[e]) ** 2 + (y - 384) ** 2 < 120 * 120) eye = 1;
      if ((x - cx[e] + 60) ** 2 + (y - 384) ** 2 < 40 * 40) pupil = 1;
    end
    return !eye ? 12'h222 : pupil ? 12'h036 : 12'hFFF;
  endfunction

  initial begin
    int hq [4], vq [4];
    int frame_checks = 0, t_sel;
    #100 arst = 0;
    while (!dut.u_feature.filled) @(posedge clk_104);
    $display("delay line filled after %0d samples", n_samples);
    checks++;
    if (n_samples < 65536) begin failures++; $display("filled too early"); end
    gaze = EYE_LEFT;
    while (eye_state != EYE_LEFT) @(posedge clk_65);
    feed = 0;
    $display("left gaze reported at %0t", $time);
    checks++;
    if (module_state != MS_MENU) begin failures++; $display("menu not active"); end
    t_sel = 0;
    while (module_state != MS_DATA && t_sel < 70_000_000) begin @(posedge clk_65); t_sel++; end
    $display("eye view selected after %0d cycles", t_sel);
    checks++;
    if (module_state != MS_DATA || t_sel < 64_000_000) begin failures++; $display("dwell wrong"); end
    // one full frame from its first pixel
    while (!(dut.hcount == 0 && dut.vcount == 0)) @(negedge clk_65);
    for (int k = 0; k < 1344 * 806 + 3; k++) begin
      for (int i = 3; i > 0; i--) begin hq[i] = hq[i-1]; vq[i] = vq[i-1]; end
      hq[0] = int'(dut.hcount); vq[0] = int'(dut.vcount);
      if (k >= 3) begin
        checks++;
        if (hq[3] < 1024 && vq[3] < 768) begin
          frame_checks++;
          if (vga_rgb != eyes_left(hq[3], vq[3])) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) %h", hq[3], vq[3], vga_rgb);
          end
        end else if (vga_rgb != 0 || !vga_blank) begin
          failures++;
          if (failures < 10) $display("blanking (%0d,%0d)", hq[3], vq[3]);
        end
      end
      @(negedge clk_65);
    end
    checks++;
    if (frame_checks != 1024 * 768) begin failures++; $display("frame checks %0d", frame_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
