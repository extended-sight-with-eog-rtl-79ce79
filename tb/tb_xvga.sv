// tb_xvga: runs the timing generator for two frames and checks the line and
// frame lengths (1344 clocks, 806 lines), the hsync pulse (136 clocks from
// column 1048), the vsync pulse (6 lines from line 771) and the blanking of
// everything outside 1024x768.
module tb_xvga;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  int checks = 0, failures = 0;

  xvga dut (.*);

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  initial begin
    int h, v, cycles;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    // the model counters start where the generator leaves reset
    h = 1; v = 0;
    @(negedge clk);
    for (cycles = 0; cycles < 2 * 1344 * 806; cycles++) begin
      expect1(hcount == 11'(h) && vcount == 10'(v), "count");
      expect1(hsync == !(h >= 1048 && h < 1184), "hsync");
      expect1(vsync == !(v >= 771 && v < 777), "vsync");
      expect1(blank == (h >= 1024 || v >= 768), "blank");
      h++;
      if (h == 1344) begin h = 0; v++; if (v == 806) v = 0; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
