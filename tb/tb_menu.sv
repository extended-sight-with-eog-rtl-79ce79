// tb_menu: with a 2048-cycle dwell, checks that the menu starts active, that
// a gaze held on a button selects its mode after one cycle to register the gaze plus 1024 steps of two
// cycles, that a gaze broken off early selects nothing, that a long closure
// returns to the menu from every mode, and that the gazed-at button is drawn
// highlighted while the others are not.
module tb_menu;
  import eog_pkg::*;
  localparam int DWELL = 2048;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  eye_state_t eye_state;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  module_state_t module_state;
  pixel_t mpixel;
  int checks = 0, failures = 0;
  int selections = 0, returns = 0;

  menu #(.DWELL_CYCLES(DWELL)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d)", what, module_state); end
  endtask

  // colour at a screen position, two cycles after presenting it
  task automatic colour_at(input int x, input int y, output pixel_t c);
    @(negedge clk); hcount = 11'(x); vcount = 10'(y);
    @(negedge clk); @(negedge clk);
    c = mpixel;
  endtask

  // hold a gaze and return the cycle count until the mode changed (0 = none)
  task automatic hold(input eye_state_t g, input int cycles, output int took);
    module_state_t s0;
    s0 = module_state;
    took = 0;
    @(negedge clk); eye_state = g;
    for (int i = 1; i <= cycles; i++) begin
      @(negedge clk);
      if (took == 0 && module_state != s0) took = i;
    end
  endtask

  initial begin
    int took;
    pixel_t c;
    eye_state = EYE_FORWARD; hcount = 0; vcount = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(module_state == MS_MENU, "starts in menu");

    // gaze left, broken off at half the dwell
    hold(EYE_LEFT, 1000, took);
    check(took == 0 && module_state == MS_MENU, "early release selects nothing");
    colour_at(100, 400, c); check(c == 12'h8F8, "left button highlighted");
    colour_at(500, 100, c); check(c == 12'h448, "top button plain");
    colour_at(10, 610, c);  check(c == 12'hFF0, "progress bar drawn");
    hold(EYE_FORWARD, 50, took);
    colour_at(100, 400, c); check(c == 12'h484, "left button plain again");

    // full dwell on each button, then a long closure back to the menu
    hold(EYE_LEFT, 2200, took);
    check(module_state == MS_DATA, "left selects eye view");
    check(took == 2049, $sformatf("dwell took %0d cycles", took));
    selections++;
    hold(EYE_CLOSED, 3, took);
    check(module_state == MS_MENU && took == 1, "closure returns to menu"); returns++;
    hold(EYE_UP, 2100, took);
    check(module_state == MS_VIRTUAL, "up selects virtual world"); selections++;
    hold(EYE_RIGHT, 2100, took);
    check(module_state == MS_VIRTUAL, "gaze outside the menu does not switch");
    hold(EYE_CLOSED, 3, took);
    check(module_state == MS_MENU, "closure returns to menu"); returns++;
    hold(EYE_RIGHT, 2100, took);
    check(module_state == MS_REAL, "right selects camera view"); selections++;
    hold(EYE_CLOSED, 3, took);
    check(module_state == MS_MENU, "closure returns to menu"); returns++;
    // switching button mid-dwell restarts the count
    hold(EYE_UP, 1500, took);
    hold(EYE_RIGHT, 1500, took);
    check(module_state == MS_MENU, "switching buttons restarts the dwell");
    hold(EYE_RIGHT, 600, took);
    check(module_state == MS_REAL, "dwell completes after restart");

    check(selections == 3 && returns == 3, "all selections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
