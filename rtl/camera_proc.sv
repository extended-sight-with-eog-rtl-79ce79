// camera_proc: camera capture into the frame buffer.
//
// The camera drives a pixel clock, href (line valid), vsync (frame start) and
// an 8-bit data bus, each pixel taking two bytes in RGB444 order
// (byte 0: xxxxRRRR, byte 1: GGGGBBBB). All four inputs are brought into the
// 65 MHz domain through two flip-flops and a rising pixel-clock edge is
// detected there, so the pixel clock must be below a quarter of 65 MHz
// (16.25 MHz, the usual camera clock of this setup). Each completed pixel is
// written into the 640x480 frame buffer at the next address of a counter that
// vsync resets; writes past the last address are dropped. The pixel is also
// given out as 24-bit RGB888 (each 4-bit colour repeated) with a valid strobe,
// along with the synchronized href and vsync. The ports and frame size follow
// the design description; the byte format and the sampling scheme are this
// design's own.
//
// Interface (clk = 65 MHz): cam_pclk/cam_href/cam_vsync/cam_data (asynchronous);
// fb_we/fb_addr/fb_wdata to the frame buffer; pixel/pixel_valid/href/vsync.
// Timing: a pixel is written 4 cycles after the pixel-clock edge of its
// second byte.
module camera_proc (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  output logic        fb_we,
  output logic [18:0] fb_addr,
  output eog_pkg::pixel_t fb_wdata,
  output logic [23:0] pixel,
  output logic        pixel_valid,
  output logic        href,
  output logic        vsync
);
  import eog_pkg::*;

  localparam int unsigned FRAME = CAM_W * CAM_H;

  logic [10:0] s1, s2;   // {pclk, href, vsync, data} synchronizers
  logic        pclk_q;
  logic        byte_sel;
  logic [3:0]  red_q;
  logic [18:0] wr_ptr;

  logic pclk_s, href_s, vsync_s;
  logic [7:0] data_s;
  assign {pclk_s, href_s, vsync_s, data_s} = s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1          <= '0;
      s2          <= '0;
      pclk_q      <= 1'b0;
      byte_sel    <= 1'b0;
      red_q       <= '0;
      wr_ptr      <= '0;
      fb_we       <= 1'b0;
      fb_addr     <= '0;
      fb_wdata    <= '0;
      pixel       <= '0;
      pixel_valid <= 1'b0;
      href        <= 1'b0;
      vsync       <= 1'b0;
    end else begin
      s1          <= {cam_pclk, cam_href, cam_vsync, cam_data};
      s2          <= s1;
      pclk_q      <= pclk_s;
      href        <= href_s;
      vsync       <= vsync_s;
      fb_we       <= 1'b0;
      pixel_valid <= 1'b0;
      if (vsync_s) begin
        wr_ptr   <= '0;
        byte_sel <= 1'b0;
      end else if (pclk_s && !pclk_q) begin
        if (!href_s) begin
          byte_sel <= 1'b0;
        end else if (!byte_sel) begin
          red_q    <= data_s[3:0];
          byte_sel <= 1'b1;
        end else begin
          byte_sel    <= 1'b0;
          pixel       <= {red_q, red_q, data_s[7:4], data_s[7:4], data_s[3:0], data_s[3:0]};
          pixel_valid <= 1'b1;
          if (wr_ptr < 19'(FRAME)) begin
            fb_we    <= 1'b1;
            fb_addr  <= wr_ptr;
            fb_wdata <= {red_q, data_s};
            wr_ptr   <= wr_ptr + 1'b1;
          end
        end
      end
    end
  end
endmodule
