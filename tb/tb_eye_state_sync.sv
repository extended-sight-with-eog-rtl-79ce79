// tb_eye_state_sync: drives one-hot eye states in a 104 MHz domain, some
// held for a long time and some changed every few cycles, and checks in the
// 65 MHz domain that only values that were driven ever appear, that every
// slowly changing value arrives within 8 destination cycles, and that the
// last value of a burst of fast changes is the one that stays.
module tb_eye_state_sync;
  import eog_pkg::*;
  logic src_clk = 0, dst_clk = 0, src_rst = 1, dst_rst = 1;
  always #4.8 src_clk = ~src_clk;
  always #7.7 dst_clk = ~dst_clk;

  eye_state_t src_state, dst_state;
  int checks = 0, failures = 0;

  eye_state_sync dut (.*);

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every value seen at the destination must be one-hot
  always @(negedge dst_clk) if (!dst_rst) begin
    checks++;
    if (!$onehot(dst_state)) begin failures++; $display("not one-hot: %b", dst_state); end
  end

  function automatic eye_state_t rnd();
    return 6'b1 << $urandom_range(0, 5);
  endfunction

  initial begin
    eye_state_t v;
    int waited;
    src_state = EYE_FORWARD;
    repeat (4) @(posedge dst_clk);
    src_rst = 0; dst_rst = 0;
    repeat (4) @(posedge dst_clk);
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        // burst of fast changes
        repeat ($urandom_range(2, 6)) begin
          @(posedge src_clk); src_state <= rnd();
        end
      end else begin
        v = rnd();
        @(posedge src_clk); src_state <= v;
      end
      @(posedge src_clk);
      v = src_state;
      waited = 0;
      while (dst_state != v && waited < 40) begin @(negedge dst_clk); waited++; end
      checks++;
      if (dst_state != v) begin failures++; $display("value %b not delivered", v); end
      repeat (10) @(negedge dst_clk);
      checks++;
      if (dst_state != v) begin failures++; $display("value %b did not stay", v); end
    end
    // latency of a single change after a quiet period
    v = (src_state == EYE_LEFT) ? EYE_RIGHT : EYE_LEFT;
    @(posedge src_clk); src_state <= v;
    waited = 0;
    while (dst_state != v && waited < 40) begin @(posedge dst_clk); waited++; end
    checks++;
    if (waited > 8) begin failures++; $display("latency %0d", waited); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
