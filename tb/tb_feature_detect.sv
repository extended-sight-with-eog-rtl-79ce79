// tb_feature_detect: plays a random sequence of gaze segments (including
// short closures that must be hidden as blinks and long ones that must be
// reported) into a 64-deep detector and checks each output against a model
// that knows the class of every generated segment. Also checks the delay
// of 64 samples and the two-cycle output latency.
module tb_feature_detect;
  import eog_pkg::*;
  localparam int D = 6, DEPTH = 64, L = 20;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [7:0] lr, ud;
  eye_state_t eye_state;
  logic out_valid;
  int checks = 0, failures = 0;
  int blinks = 0, longs = 0;

  feature_detect #(.DEPTH_LOG2(D), .LONG_CLOSE(L), .TH_H(30), .TH_V(30), .TH_CLOSED(90))
    dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 3000;
  eye_state_t cls [NS];

  function automatic void make(input eye_state_t c, output logic signed [7:0] l,
                               output logic signed [7:0] u);
    l = 8'($urandom_range(0, 60) - 30);
    u = 8'($urandom_range(0, 60) - 30);
    unique case (c)
      EYE_CLOSED: u = 8'($urandom_range(91, 127));
      EYE_UP:     u = 8'($urandom_range(31, 90));
      EYE_DOWN:   u = 8'(-$urandom_range(31, 128));
      EYE_LEFT:   l = 8'(-$urandom_range(31, 128));
      EYE_RIGHT:  l = 8'($urandom_range(31, 127));
      default: ;
    endcase
  endfunction

  function automatic bit is_long(input int t);
    int s, e;
    s = t;
    while (s > 0 && cls[s-1] == EYE_CLOSED) s--;
    e = t;
    while (e + 1 < NS && cls[e+1] == EYE_CLOSED) e++;
    return (e - s + 1) >= L;
  endfunction

  initial begin
    eye_state_t c, expect_s, prev;
    int n, len, t;
    logic signed [7:0] l, u;
    eye_state_t choices [6] = '{EYE_LEFT, EYE_RIGHT, EYE_UP, EYE_DOWN, EYE_CLOSED, EYE_FORWARD};
    // build the class sequence
    n = 0;
    while (n < NS) begin
      c = choices[$urandom_range(0, 5)];
      len = (c == EYE_CLOSED) ? (($urandom_range(0, 1) == 1) ? $urandom_range(2, L - 1)
                                                              : $urandom_range(L, 2 * L))
                              : $urandom_range(1, 30);
      for (int i = 0; i < len && n < NS; i++) cls[n++] = c;
    end
    // end of the sequence must not cut a closed run short of the window
    for (int i = NS - 2 * L; i < NS; i++) cls[i] = EYE_FORWARD;

    in_valid = 0; lr = 0; ud = 0;
    prev = EYE_FORWARD;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < NS; k++) begin
      make(cls[k], l, u);
      lr <= l; ud <= u; in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid one cycle early"); end
      @(negedge clk);
      if (k >= DEPTH) begin
        t = k - DEPTH;
        if (cls[t] != EYE_CLOSED) expect_s = cls[t];
        else if (is_long(t)) expect_s = EYE_CLOSED;
        else expect_s = prev;
        if (cls[t] == EYE_CLOSED && expect_s != EYE_CLOSED &&
            (t == 0 || cls[t-1] != EYE_CLOSED)) blinks++;
        if (cls[t] == EYE_CLOSED && expect_s == EYE_CLOSED &&
            (t == 0 || cls[t-1] != EYE_CLOSED)) longs++;
        checks++;
        if (!out_valid || eye_state != expect_s) begin
          failures++;
          if (failures < 10)
            $display("k=%0d t=%0d ov=%b got %b want %b (raw %b)", k, t, out_valid,
                     eye_state, expect_s, cls[t]);
        end
        prev = expect_s;
      end else begin
        checks++;
        if (out_valid || eye_state != EYE_FORWARD) begin
          failures++; $display("output before the delay line filled");
        end
      end
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    $display("blinks hidden %0d, long closures reported %0d", blinks, longs);
    checks++;
    if (blinks == 0 || longs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
