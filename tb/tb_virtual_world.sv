// tb_virtual_world: loads the full 2048x1536 panorama with a pattern
// computed from the coordinates, then pans in all four directions (including
// across the wrap-around edges) by issuing frame ticks with a gaze held, and
// checks random screen positions against the pattern at the expected offset,
// two cycles after each position is presented.
module tb_virtual_world;
  import eog_pkg::*;
  localparam int W = 2048, H = 1536, STEP = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  eye_state_t eye_state;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic load_we;
  logic [21:0] load_addr;
  pixel_t load_data, vpixel;
  int checks = 0, failures = 0;
  int wraps = 0;

  virtual_world #(.IMG_W(W), .IMG_H(H), .STEP(STEP)) dut (.*);

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t pat(input int x, input int y);
    return 12'((x * 5) ^ (y * 11) ^ (x >> 3));
  endfunction

  int ox = 0, oy = 0;

  task automatic frame(input eye_state_t g);
    @(negedge clk);
    eye_state = g; hcount = 0; vcount = 768;
    @(negedge clk);
    case (g)
      EYE_LEFT:  begin ox -= STEP; if (ox < 0) begin ox += W; wraps++; end end
      EYE_RIGHT: begin ox += STEP; if (ox >= W) begin ox -= W; wraps++; end end
      EYE_UP:    begin oy -= STEP; if (oy < 0) begin oy += H; wraps++; end end
      EYE_DOWN:  begin oy += STEP; if (oy >= H) begin oy -= H; wraps++; end end
      default: ;
    endcase
    eye_state = EYE_FORWARD;
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
        if (vpixel != pat((x + ox) % W, (y + oy) % H)) begin
          failures++;
          if (failures < 10)
            $display("(%0d,%0d) off (%0d,%0d) got %h want %h", x, y, ox, oy, vpixel,
                     pat((x + ox) % W, (y + oy) % H));
        end
      end
    end
  endtask

  initial begin
    eye_state = EYE_FORWARD; hcount = 0; vcount = 0;
    load_we = 0; load_addr = 0; load_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        load_we = 1; load_addr = 22'(y * W + x); load_data = pat(x, y);
      end
    @(negedge clk);
    load_we = 0;
    probe(200);
    for (int i = 0; i < 5; i++) begin frame(EYE_LEFT); probe(50); end
    for (int i = 0; i < 7; i++) begin frame(EYE_UP); probe(50); end
    for (int i = 0; i < 3; i++) begin frame(EYE_RIGHT); probe(50); end
    for (int i = 0; i < 2; i++) begin frame(EYE_DOWN); probe(50); end
    for (int i = 0; i < 4; i++) begin frame(EYE_CLOSED); probe(20); end
    // a long pan to the right crosses the right edge
    for (int i = 0; i < 260; i++) frame(EYE_RIGHT);
    probe(200);
    for (int i = 0; i < 200; i++) frame(EYE_DOWN);
    probe(200);
    checks++;
    if (wraps < 3) begin failures++; $display("only %0d wraps", wraps); end
    $display("wraps %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
