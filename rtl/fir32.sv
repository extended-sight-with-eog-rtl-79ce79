// fir32: 32-tap FIR filter for 8-bit samples, one multiply-accumulate per cycle.
//
// Each new sample is shifted into a 32-entry array of 8-bit registers; the
// block then walks the array with a single multiplier, one tap per clock, and
// divides the sum by 2**SHIFT with saturation to 8 bits. At 104 MHz and
// 62.5 kS/s there are 1664 cycles per sample, so a serial MAC finishes each
// output long before the next input. The 32-register sample array follows
// the design description; the serial schedule and the coefficient format are
// this design's own.
//
// Interface: in_valid/in_sample (ignored while busy), out_valid pulse with
// out_sample. COEFS packs N signed CW-bit coefficients, tap 0 (newest
// sample) in the least significant bits.
// Timing: out_valid rises N+2 cycles after in_valid.
module fir32 #(
  parameter int unsigned N     = 32,
  parameter int unsigned CW    = 12,
  parameter int unsigned SHIFT = 10,
  parameter logic [N*CW-1:0] COEFS = {N{12'sd32}}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] in_sample,
  output logic              out_valid,
  output logic signed [7:0] out_sample
);
  localparam int unsigned AW = 8 + CW + $clog2(N) + 1;
  localparam int unsigned IW = $clog2(N);

  logic signed [7:0]    taps [N];
  logic signed [AW-1:0] acc;
  logic [IW-1:0]        idx;
  logic                 busy;

  logic signed [CW-1:0]    coef;
  logic signed [8+CW-1:0]  prod;
  logic signed [AW-1:0]    sum;

  assign coef = $signed(COEFS[idx*CW +: CW]);
  assign prod = taps[idx] * coef;
  assign sum  = acc + AW'(prod);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) taps[i] <= '0;
      acc        <= '0;
      idx        <= '0;
      busy       <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          taps[0] <= in_sample;
          for (int i = 1; i < int'(N); i++) taps[i] <= taps[i-1];
          acc  <= '0;
          idx  <= '0;
          busy <= 1'b1;
        end
      end else begin
        acc <= sum;
        if (idx == IW'(N - 1)) begin
          busy       <= 1'b0;
          out_valid  <= 1'b1;
          out_sample <= eog_pkg::sat8(int'(sum) >>> SHIFT);
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
