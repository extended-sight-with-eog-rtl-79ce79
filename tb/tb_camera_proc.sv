// tb_camera_proc: a camera model sends RGB444 pixels (two bytes each, data
// changing on the falling pixel-clock edge, pixel clock a quarter of the
// system clock) in lines framed by href and frames started by vsync. The
// test sends a full frame plus one extra line, then a short second frame,
// and checks every frame-buffer write (address in order from 0 after vsync,
// data = the pixel sent), the 24-bit pixel output, and that nothing is
// written past the 640x480 frame.
module tb_camera_proc;
  import eog_pkg::*;
  logic clk = 0, rst = 1;
  always #7.5 clk = ~clk;

  logic cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [7:0] cam_data = 0;
  logic fb_we;
  logic [18:0] fb_addr;
  pixel_t fb_wdata;
  logic [23:0] pixel;
  logic pixel_valid, href, vsync;
  int checks = 0, failures = 0;
  int writes = 0, valids = 0;

  camera_proc dut (.*);

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t pat(input int f, input int a);
    return 12'(a * 3 + f * 1000 + (a >> 7));
  endfunction

  int frame_no = 0;
  int exp_addr = 0;

  // every write must be the next pixel of the current frame
  always @(posedge clk) begin
    if (fb_we && !rst) begin
      writes++;
      checks++;
      if (fb_addr != 19'(exp_addr) || fb_wdata != pat(frame_no, exp_addr) || exp_addr >= 640 * 480) begin
        failures++;
        if (failures < 10) $display("write a=%0d d=%h want a=%0d d=%h", fb_addr, fb_wdata,
                                    exp_addr, pat(frame_no, exp_addr));
      end
      exp_addr++;
    end
    if (pixel_valid && !rst) begin
      valids++;
    end
  end

  // pixel output: each colour nibble doubled
  always @(posedge clk) if (fb_we && !rst) begin
    checks++;
    if (pixel != {fb_wdata[11:8], fb_wdata[11:8], fb_wdata[7:4], fb_wdata[7:4],
                  fb_wdata[3:0], fb_wdata[3:0]} || !pixel_valid) begin
      failures++; $display("pixel %h for %h", pixel, fb_wdata);
    end
  end

  task automatic pbyte(input logic [7:0] b);
    #15; cam_pclk = 0; cam_data = b;
    #15; #15; #15;
    cam_pclk = 1;
    #0;
  endtask

  task automatic send_frame(input int f, input int lines);
    int a;
    #60 cam_vsync = 1;
    #600 cam_vsync = 0;
    #600;
    a = 0;
    for (int l = 0; l < lines; l++) begin
      cam_href = 1;
      for (int p = 0; p < 640; p++) begin
        pbyte({4'h0, pat(f, a)[11:8]});
        pbyte(pat(f, a)[7:0]);
        a++;
      end
      #60 cam_pclk = 0;
      cam_href = 0;
      #300;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    frame_no = 0;
    fork
      send_frame(0, 481);
      begin @(posedge vsync); exp_addr = 0; end
    join
    #1000;
    checks++;
    if (writes != 640 * 480) begin failures++; $display("writes %0d", writes); end
    checks++;
    if (valids != 640 * 481) begin failures++; $display("pixels %0d", valids); end
    writes = 0;
    fork
      send_frame(1, 3);
      begin @(posedge vsync); frame_no = 1; exp_addr = 0; end
    join
    #1000;
    checks++;
    if (writes != 640 * 3) begin failures++; $display("second frame writes %0d", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
