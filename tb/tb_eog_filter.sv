// tb_eog_filter: feeds random samples (with steps, so the high-pass has work
// to do) into the filter and compares both channels with a straight-line
// model of ground referencing, 32-tap moving average, drift remover,
// two-tap notch and gain. Also checks that every result arrives within the
// 1664 cycles between samples.
module tb_eog_filter;
  import eog_pkg::*;
  localparam int K = 4;   // short high-pass time constant for the test
  localparam int GAIN = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [7:0] gnd, lr, ud;
  logic out_valid;
  logic signed [7:0] lr_f, ud_f;
  int checks = 0, failures = 0;

  eog_filter #(.HPF_SHIFT(K), .GAIN(GAIN)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state, per channel
  int xh [2][$];
  int hh [2][$];
  longint base [2];

  function automatic int fsat(input longint v);
    return (v > 127) ? 127 : (v < -128) ? -128 : int'(v);
  endfunction

  function automatic int floordiv(input longint a, input int sh);
    return int'(a >>> sh);
  endfunction

  function automatic int model(input int c, input int x);
    longint s;
    int lp, d, hp, nt;
    xh[c].push_front(x);
    if (xh[c].size() > 32) void'(xh[c].pop_back());
    s = 0;
    foreach (xh[c][i]) s += longint'(xh[c][i]) * 32;
    lp = fsat(floordiv(s, 10));
    d = lp - int'(base[c] >>> K);
    base[c] += d;
    hp = fsat(d);
    hh[c].push_front(hp);
    if (hh[c].size() > 32) void'(hh[c].pop_back());
    s = longint'(hh[c][0]) * 512 + ((hh[c].size() == 32) ? longint'(hh[c][31]) * 512 : 0);
    nt = fsat(floordiv(s, 10));
    return fsat(longint'(nt) * GAIN);
  endfunction

  int lat, max_lat = 0;
  initial begin
    int level_l, level_u, el, eu;
    base[0] = 0; base[1] = 0;
    in_valid = 0; gnd = 0; lr = 0; ud = 0;
    level_l = 0; level_u = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      if ((n % 50) == 0) begin
        level_l = $urandom_range(0, 160) - 80;
        level_u = $urandom_range(0, 160) - 80;
      end
      gnd <= 8'($urandom_range(0, 20) - 10);
      lr  <= 8'(level_l + $urandom_range(0, 20) - 10);
      ud  <= 8'(level_u + $urandom_range(0, 20) - 10);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      el = model(0, fsat(longint'(lr) - longint'(gnd)));
      eu = model(1, fsat(longint'(ud) - longint'(gnd)));
      lat = 0;
      while (!out_valid && lat < 2000) begin @(negedge clk); lat++; end
      checks++;
      if (!out_valid || lr_f != 8'(el) || ud_f != 8'(eu)) begin
        failures++;
        if (failures < 10)
          $display("n=%0d ov=%b lat=%0d got %0d %0d want %0d %0d", n, out_valid, lat, lr_f, ud_f, el, eu);
      end
      if (lat > max_lat) max_lat = lat;
      repeat ($urandom_range(1, 20)) @(posedge clk);
    end
    checks++;
    if (max_lat >= 1664) begin failures++; $display("latency %0d too long", max_lat); end
    $display("filter latency %0d cycles", max_lat + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
