// tb_motor_control: with a short period, checks that each PWM period is
// PERIOD cycles long and that the pulse width is the left, right or stop
// setting according to motor_on and the left/right bits.
module tb_motor_control;
  localparam int P = 1000, WL = 80, WS = 100, WR = 120;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0] lr;
  logic motor_on, pwm;
  int checks = 0, failures = 0;

  motor_control #(.PERIOD(P), .PW_LEFT(WL), .PW_STOP(WS), .PW_RIGHT(WR)) dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one period starting at a rising edge of pwm
  task automatic measure(output int high, output int len);
    @(posedge pwm);
    high = 0; len = 0;
    do begin @(negedge clk); len++; if (pwm) high++; end
    while (!(pwm && len > 1 && high != len) || high == len);
    // loop left on the first high cycle of the next period
    len = len - 1;
    high = high - 1;
  endtask

  initial begin
    int h, l, want;
    logic [2:0] setting [6] = '{3'b110, 3'b101, 3'b000, 3'b010, 3'b100, 3'b111};
    lr = 0; motor_on = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (setting[i]) begin
      {motor_on, lr} = setting[i];
      @(posedge pwm);          // setting latched at this period start at the latest
      measure(h, l);
      want = (setting[i] == 3'b110) ? WL : (setting[i] == 3'b101) ? WR : WS;
      checks += 2;
      if (l != P) begin failures++; $display("period %0d", l); end
      if (h != want) begin failures++; $display("setting %b width %0d want %0d", setting[i], h, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
