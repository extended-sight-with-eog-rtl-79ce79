// adc_sampler: 16:1 down-sampler behind the FPGA's XADC.
//
// The XADC delivers 12-bit two's complement conversions of three inputs, the
// electrode ground, the left/right pair and the up/down pair, each at about
// 1 MS/s. This block keeps one conversion set out of every DECIM (16, giving
// 62.5 kS/s) and passes on the 8 most significant bits of each channel, as the
// design calls for. A set is complete when its up/down conversion arrives
// (channel 2); the ground and left/right values of the same set are latched
// as they come. The channel numbering and the set order are this design's own.
//
// Interface (clk = 104 MHz domain):
//   in_valid/in_chan/in_data  one conversion; chan 0 = ground, 1 = left/right,
//                             2 = up/down
//   gnd/lr/ud, ready          8-bit samples, ready is a one-cycle pulse
// Timing: ready rises one cycle after the up/down conversion of every 16th set.
module adc_sampler #(
  parameter int unsigned DECIM = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [1:0]        in_chan,
  input  logic signed [11:0] in_data,
  output logic signed [7:0] gnd,
  output logic signed [7:0] lr,
  output logic signed [7:0] ud,
  output logic              ready
);
  localparam int unsigned CW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [CW-1:0]     set_cnt;
  logic signed [7:0] gnd_q, lr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      set_cnt <= '0;
      gnd_q   <= '0;
      lr_q    <= '0;
      gnd     <= '0;
      lr      <= '0;
      ud      <= '0;
      ready   <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (in_valid) begin
        unique case (in_chan)
          2'd0: gnd_q <= in_data[11:4];
          2'd1: lr_q  <= in_data[11:4];
          2'd2: begin
            if (set_cnt == CW'(DECIM - 1)) begin
              set_cnt <= '0;
              gnd     <= gnd_q;
              lr      <= lr_q;
              ud      <= in_data[11:4];
              ready   <= 1'b1;
            end else begin
              set_cnt <= set_cnt + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
