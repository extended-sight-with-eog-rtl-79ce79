// frame_buffer: one camera frame, 640 x 480 pixels of 12 bits (3,686,400 bits),
// as a simple dual-port block RAM.
//
// The camera capture writes it and the camera view reads it, both on the
// 65 MHz clock. The frame size and pixel depth follow the design description.
//
// Interface: we/waddr/wdata write port; raddr/rdata read port.
// Timing: rdata is registered, one cycle after raddr.
module frame_buffer #(
  parameter int unsigned DEPTH = eog_pkg::CAM_W * eog_pkg::CAM_H
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  eog_pkg::pixel_t            wdata,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output eog_pkg::pixel_t            rdata
);
  eog_pkg::pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
