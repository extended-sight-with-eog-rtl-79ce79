// pixel_mux: the output multiplexer of the graphics section.
//
// Chooses the eye view (dpixel), virtual world (vpixel), camera view (rpixel)
// or menu (mpixel) pixel by module_state, forces black during blanking, and
// delays the timing generator's hsync/vsync/blank by the pixel generators'
// PIXEL_LAT cycles so that colour and sync leave the chip together. The
// multiplexer driven by the menu's module_state is the design's; the delay
// alignment and output register are this design's own.
//
// Interface (clk = 65 MHz): module_state, four pixel inputs, hsync/vsync/
// blank straight from the timing generator; vga_rgb/vga_hsync/vga_vsync/
// vga_blank to the monitor.
// Timing: outputs are registered; the pixel for (hcount, vcount) leaves
// PIXEL_LAT + 1 = 3 cycles after that position was generated.
module pixel_mux (
  input  logic                   clk,
  input  logic                   rst,
  input  eog_pkg::module_state_t module_state,
  input  eog_pkg::pixel_t        dpixel,
  input  eog_pkg::pixel_t        vpixel,
  input  eog_pkg::pixel_t        rpixel,
  input  eog_pkg::pixel_t        mpixel,
  input  logic                   hsync,
  input  logic                   vsync,
  input  logic                   blank,
  output eog_pkg::pixel_t        vga_rgb,
  output logic                   vga_hsync,
  output logic                   vga_vsync,
  output logic                   vga_blank
);
  import eog_pkg::*;

  logic [PIXEL_LAT-1:0] hs_d, vs_d, bl_d;
  pixel_t sel;

  always_comb begin
    unique case (module_state)
      MS_DATA:    sel = dpixel;
      MS_VIRTUAL: sel = vpixel;
      MS_REAL:    sel = rpixel;
      default:    sel = mpixel;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d      <= '1;
      vs_d      <= '1;
      bl_d      <= '1;
      vga_rgb   <= '0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_blank <= 1'b1;
    end else begin
      hs_d      <= {hs_d[PIXEL_LAT-2:0], hsync};
      vs_d      <= {vs_d[PIXEL_LAT-2:0], vsync};
      bl_d      <= {bl_d[PIXEL_LAT-2:0], blank};
      vga_hsync <= hs_d[PIXEL_LAT-1];
      vga_vsync <= vs_d[PIXEL_LAT-1];
      vga_blank <= bl_d[PIXEL_LAT-1];
      vga_rgb   <= bl_d[PIXEL_LAT-1] ? '0 : sel;
    end
  end
endmodule
