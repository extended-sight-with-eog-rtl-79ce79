// motor_control: servo PWM for panning the camera left or right.
//
// Produces a pulse every PERIOD cycles (20 ms at 65 MHz). The pulse is
// PW_LEFT long while motor_on is set and the eye state's Left bit
// (eye_state[5]) is set, PW_RIGHT for the Right bit (eye_state[4]), and
// PW_STOP otherwise, which holds a continuous-rotation servo still. The width
// is latched at the start of each period so that no pulse is cut short. The
// two preset settings selected by a case statement on eye_state[5:4] and
// motor_on follow the design description; the pulse widths (1.3/1.5/1.7 ms)
// are the usual values for continuous-rotation servos and this design's
// own; which of them turns the camera left depends on the mounting.
//
// Interface (clk = 65 MHz): lr = eye_state[5:4], motor_on; pwm.
module motor_control #(
  parameter int unsigned PERIOD   = 1_300_000,  // 20 ms
  parameter int unsigned PW_LEFT  = 84_500,     // 1.3 ms
  parameter int unsigned PW_STOP  = 97_500,     // 1.5 ms
  parameter int unsigned PW_RIGHT = 110_500     // 1.7 ms
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] lr,
  input  logic       motor_on,
  output logic       pwm
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic [CW-1:0] width;
  logic [CW-1:0] next_width;

  always_comb begin
    unique case ({motor_on, lr})
      3'b110:  next_width = CW'(PW_LEFT);
      3'b101:  next_width = CW'(PW_RIGHT);
      default: next_width = CW'(PW_STOP);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      width <= CW'(PW_STOP);
      pwm   <= 1'b0;
    end else begin
      if (cnt == CW'(PERIOD - 1)) begin
        cnt   <= '0;
        width <= next_width;
      end else begin
        cnt <= cnt + 1'b1;
      end
      pwm <= (cnt < width);
    end
  end
endmodule
