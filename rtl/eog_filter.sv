// eog_filter: conditioning of the two EOG channels.
//
// Per channel the chain is: reference to the electrode ground
// (channel - ground, saturated), a 32-tap low-pass FIR, a high-pass stage, a
// 32-tap notch FIR and a gain stage standing in for the non-inverting
// amplifier. The order low-pass, high-pass, notch, amplifier and the 32 x 8-bit
// sample array come from the design description; the coefficients do not.
//
// Own choices, all parameters:
//  * Low-pass: 32-tap moving average (unity gain at DC).
//  * High-pass: a 32-tap FIR cannot reach a sub-hertz corner at 62.5 kS/s,
//    and EOG gaze information sits below a few hertz, so the high-pass is a
//    first-order drift remover, y = x - b, b += (x - b) / 2**HPF_SHIFT. With
//    HPF_SHIFT = 17 the time constant is about 2.1 s.
//  * Notch: (x[n] + x[n-31]) / 2, nulls at odd multiples of fs/62 (about
//    1 kHz). A mains notch would need several hundred taps at this rate.
//  * Gain: multiply by GAIN, saturate to 8 bits.
//
// Interface (clk = 104 MHz): in_valid with gnd/lr/ud from the ADC block;
// out_valid pulse with lr_f/ud_f.
// Timing: out_valid follows in_valid by 68 cycles (1 + 2 x 33 + 1 + 1 with
// the default 32 taps), far less than the 1664 cycles between samples.
module eog_filter #(
  parameter int unsigned HPF_SHIFT = 17,
  parameter int          GAIN      = 2,
  parameter logic [32*12-1:0] LPF_COEFS   = {32{12'sd32}},
  parameter logic [32*12-1:0] NOTCH_COEFS = {12'sd512, {30{12'sd0}}, 12'sd512}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] gnd,
  input  logic signed [7:0] lr,
  input  logic signed [7:0] ud,
  output logic              out_valid,
  output logic signed [7:0] lr_f,
  output logic signed [7:0] ud_f
);
  import eog_pkg::*;

  // stage 0: reference to ground
  logic              ref_valid;
  logic signed [7:0] ref_s [2];

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_valid <= 1'b0;
      ref_s[0]  <= '0;
      ref_s[1]  <= '0;
    end else begin
      ref_valid <= in_valid;
      if (in_valid) begin
        ref_s[0] <= sat8(int'(lr) - int'(gnd));
        ref_s[1] <= sat8(int'(ud) - int'(gnd));
      end
    end
  end

  logic              lp_valid [2], hp_valid [2], nt_valid [2];
  logic signed [7:0] lp_s [2], hp_s [2], nt_s [2];
  logic              gain_valid [2];
  logic signed [7:0] gain_s [2];

  for (genvar c = 0; c < 2; c++) begin : g_chan
    fir32 #(.COEFS(LPF_COEFS)) u_lpf (
      .clk, .rst, .in_valid(ref_valid), .in_sample(ref_s[c]),
      .out_valid(lp_valid[c]), .out_sample(lp_s[c]));

    // high-pass: subtract a slowly tracking baseline
    logic signed [8+HPF_SHIFT:0] base_q;  // baseline * 2**HPF_SHIFT
    logic signed [9:0]           hp_diff;
    assign hp_diff = 10'(lp_s[c]) - 10'(base_q >>> HPF_SHIFT);

    always_ff @(posedge clk) begin
      if (rst) begin
        base_q      <= '0;
        hp_valid[c] <= 1'b0;
        hp_s[c]     <= '0;
      end else begin
        hp_valid[c] <= lp_valid[c];
        if (lp_valid[c]) begin
          base_q  <= base_q + (9+HPF_SHIFT)'(hp_diff);
          hp_s[c] <= sat8(int'(hp_diff));
        end
      end
    end

    fir32 #(.COEFS(NOTCH_COEFS)) u_notch (
      .clk, .rst, .in_valid(hp_valid[c]), .in_sample(hp_s[c]),
      .out_valid(nt_valid[c]), .out_sample(nt_s[c]));

    always_ff @(posedge clk) begin
      if (rst) begin
        gain_valid[c] <= 1'b0;
        gain_s[c]     <= '0;
      end else begin
        gain_valid[c] <= nt_valid[c];
        if (nt_valid[c]) gain_s[c] <= sat8(int'(nt_s[c]) * GAIN);
      end
    end
  end

  // both channels run in lockstep
  assign out_valid = gain_valid[0];
  assign lr_f      = gain_s[0];
  assign ud_f      = gain_s[1];
endmodule
