// xvga: video timing generator for 1024x768 at 60 Hz from a 65 MHz clock.
//
// Two counters sweep 1344 clocks per line and 806 lines per frame (VESA
// timing: 24/136/160 clock horizontal front porch/sync/back porch, 3/6/29
// line vertical). hsync and vsync are active low, blank is high outside the
// 1024x768 visible area. The resolution and clock come from the design
// description; the porch and polarity values are the VESA standard's.
//
// Interface: hcount[10:0], vcount[9:0], hsync, vsync, blank, all registered
// and mutually aligned (they describe the same pixel).
module xvga (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  import eog_pkg::*;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOTAL - 1)) ? '0 : hcount + 1'b1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_next = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_ACTIVE + H_FP) && h_next < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= !(v_next >= 10'(V_ACTIVE + V_FP) && v_next < 10'(V_ACTIVE + V_FP + V_SYNC));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end
endmodule
