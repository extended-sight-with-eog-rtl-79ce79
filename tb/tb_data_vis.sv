// tb_data_vis: for every eye state, presents a few hundred screen positions
// (random ones and ones near the eye and pupil centres) and checks the colour
// two cycles later against an integer model of the two eyes and pupils.
module tb_data_vis;
  import eog_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  eye_state_t eye_state;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  pixel_t dpixel;
  int checks = 0, failures = 0;
  int n_pupil = 0, n_lid = 0, n_white = 0;

  data_vis dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t model(input eye_state_t s, input int x, input int y);
    int cx [2] = '{352, 672};
    int ox, oy;
    bit eye, pupil;
    ox = (s == EYE_LEFT) ? -60 : (s == EYE_RIGHT) ? 60 : 0;
    oy = (s == EYE_UP) ? -60 : (s == EYE_DOWN) ? 60 : 0;
    eye = 0; pupil = 0;
    for (int e = 0; e < 2; e++) begin
      if ((x - cx[e]) ** 2 + (y - 384) ** 2 < 120 * 120) eye = 1;
      if ((x - cx[e] - ox) ** 2 + (y - 384 - oy) ** 2 < 40 * 40) pupil = 1;
    end
    if (!eye) return 12'h222;
    if (s == EYE_CLOSED) return 12'hC96;
    if (pupil) return 12'h036;
    return 12'hFFF;
  endfunction

  initial begin
    eye_state_t states [6] = '{EYE_LEFT, EYE_RIGHT, EYE_UP, EYE_DOWN, EYE_CLOSED, EYE_FORWARD};
    int xs [$], ys [$];
    int x, y;
    pixel_t want;
    eye_state = EYE_FORWARD; hcount = 0; vcount = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (states[si]) begin
      for (int k = 0; k < 400; k++) begin
        if (k % 2 == 0) begin
          x = $urandom_range(0, 1023); y = $urandom_range(0, 767);
        end else begin
          x = ((k % 4 == 1) ? 352 : 672) + $urandom_range(0, 240) - 120;
          y = 384 + $urandom_range(0, 240) - 120;
        end
        @(negedge clk);
        eye_state = states[si]; hcount = 11'(x); vcount = 10'(y);
        xs.push_back(x); ys.push_back(y);
        if (xs.size() == 3) begin
          // position presented two cycles ago is the one now at the output
          x = xs.pop_front(); y = ys.pop_front();
          want = model(states[si], x, y);
          checks++;
          if (dpixel != want) begin
            failures++;
            if (failures < 10) $display("state %b (%0d,%0d) got %h want %h", states[si], x, y, dpixel, want);
          end
          if (want == 12'h036) n_pupil++;
          if (want == 12'hC96) n_lid++;
          if (want == 12'hFFF) n_white++;
        end
      end
      xs.delete(); ys.delete();
    end
    checks++;
    if (n_pupil == 0 || n_lid == 0 || n_white == 0) failures++;
    $display("pupil %0d lid %0d white %0d", n_pupil, n_lid, n_white);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
