// tb_real_world: a frame-buffer model returns a pattern of the address one
// cycle after each read. The test pans the camera view with held gazes,
// runs into both horizontal limits, and checks the displayed pixels (2x
// enlarged camera pixels at the expected offset) and that motor_on is raised
// exactly when the gaze pushes against the left or right limit.
module tb_real_world;
  import eog_pkg::*;
  localparam int STEP = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  eye_state_t eye_state;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [18:0] fb_addr;
  pixel_t fb_data, rpixel;
  logic motor_on;
  int checks = 0, failures = 0;
  int motor_events = 0, clamps = 0;

  real_world #(.STEP(STEP)) dut (.*);

  function automatic pixel_t pat(input int a);
    return 12'((a * 7) ^ (a >> 9));
  endfunction

  always_ff @(posedge clk) fb_data <= pat(int'(fb_addr));

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ox = 0, oy = 0;

  task automatic frame(input eye_state_t g);
    bit want_motor;
    @(negedge clk);
    eye_state = g; hcount = 0; vcount = 768;
    want_motor = (g == EYE_LEFT && ox == 0) || (g == EYE_RIGHT && ox == 256);
    case (g)
      EYE_LEFT:  ox = (ox > STEP) ? ox - STEP : 0;
      EYE_RIGHT: ox = (ox + STEP < 256) ? ox + STEP : 256;
      EYE_UP:    oy = (oy > STEP) ? oy - STEP : 0;
      EYE_DOWN:  oy = (oy + STEP < 192) ? oy + STEP : 192;
      default: ;
    endcase
    @(negedge clk);
    eye_state = EYE_FORWARD; hcount = 1; vcount = 768;
    checks++;
    if (motor_on != want_motor) begin
      failures++; $display("motor_on %b want %b (gaze %b ox %0d)", motor_on, want_motor, g, ox);
    end
    if (want_motor) motor_events++;
  endtask

  task automatic probe(input int n);
    int xs [$], ys [$];
    int x, y;
    for (int k = 0; k < n + 2; k++) begin
      x = $urandom_range(0, 1023); y = $urandom_range(0, 767);
      if (k < 4) begin x = (k % 2) ? 1023 : 0; y = (k / 2) ? 767 : 0; end
      @(negedge clk);
      hcount = 11'(x); vcount = 10'(y);
      xs.push_back(x); ys.push_back(y);
      if (xs.size() == 3) begin
        x = xs.pop_front(); y = ys.pop_front();
        checks++;
        if (rpixel != pat(((y + oy) / 2) * 640 + (x + ox) / 2)) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) off (%0d,%0d) got %h", x, y, ox, oy, rpixel);
        end
      end
    end
  endtask

  initial begin
    eye_state = EYE_FORWARD; hcount = 0; vcount = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    probe(100);
    frame(EYE_LEFT); probe(20);                 // already at the left edge
    for (int i = 0; i < 40; i++) begin frame(EYE_RIGHT); probe(10); end
    for (int i = 0; i < 30; i++) begin frame(EYE_DOWN); probe(10); end
    for (int i = 0; i < 7; i++) begin frame(EYE_UP); probe(10); end
    for (int i = 0; i < 3; i++) begin frame(EYE_CLOSED); probe(10); end
    for (int i = 0; i < 40; i++) begin frame(EYE_LEFT); probe(10); end
    checks++;
    if (motor_events < 3) begin failures++; $display("motor events %0d", motor_events); end
    $display("motor events %0d", motor_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
