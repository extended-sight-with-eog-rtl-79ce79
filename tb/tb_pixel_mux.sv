// tb_pixel_mux: drives random pixels, modes and sync levels and checks that
// the output shows the pixel of the selected source one cycle later, black
// when the blank presented two cycles before that pixel is set, and the sync
// and blank inputs three cycles later.
module tb_pixel_mux;
  import eog_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  module_state_t module_state;
  pixel_t dpixel, vpixel, rpixel, mpixel, vga_rgb;
  logic hsync, vsync, blank, vga_hsync, vga_vsync, vga_blank;
  int checks = 0, failures = 0;
  int seen [4];

  pixel_mux dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] syn [2000];
    pixel_t     sel [2000];
    pixel_t want;
    module_state = MS_MENU; dpixel = 0; vpixel = 0; rpixel = 0; mpixel = 0;
    hsync = 1; vsync = 1; blank = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      // outputs now: pixel chosen in cycle k-1, sync/blank presented in k-3
      if (k >= 3) begin
        checks += 2;
        if ({vga_hsync, vga_vsync, vga_blank} != syn[k-3]) begin
          failures++; $display("sync got %b want %b", {vga_hsync, vga_vsync, vga_blank}, syn[k-3]);
        end
        want = syn[k-3][0] ? 12'h000 : sel[k-1];
        if (vga_rgb != want) begin failures++; $display("rgb got %h want %h", vga_rgb, want); end
      end
      module_state = module_state_t'($urandom_range(0, 3));
      dpixel = 12'($urandom); vpixel = 12'($urandom);
      rpixel = 12'($urandom); mpixel = 12'($urandom);
      hsync = 1'($urandom); vsync = 1'($urandom); blank = 1'($urandom);
      sel[k] = (module_state == MS_DATA) ? dpixel : (module_state == MS_VIRTUAL) ? vpixel :
               (module_state == MS_REAL) ? rpixel : mpixel;
      syn[k] = {hsync, vsync, blank};
      seen[module_state]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
