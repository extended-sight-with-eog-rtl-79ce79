// tb_adc_sampler: drives random conversion sets (ground, left/right,
// up/down) into the down-sampler and checks that exactly every 16th set comes
// out, one cycle after its up/down conversion, as the 8 MSBs of each channel.
module tb_adc_sampler;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid;
  logic [1:0] in_chan;
  logic signed [11:0] in_data;
  logic signed [7:0] gnd, lr, ud;
  logic ready;
  int checks = 0, failures = 0;

  adc_sampler dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ready_seen = 0;
  always @(posedge clk) if (!rst && ready) ready_seen++;

  task automatic conv(input logic [1:0] ch, input logic [11:0] d);
    in_valid <= 1; in_chan <= ch; in_data <= d;
    @(posedge clk);
    in_valid <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    logic [11:0] g, l, u;
    in_valid = 0; in_chan = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int s = 0; s < 16 * 20; s++) begin
      g = 12'($urandom); l = 12'($urandom); u = 12'($urandom);
      conv(2'd0, g);
      conv(2'd1, l);
      in_valid <= 1; in_chan <= 2'd2; in_data <= u;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if ((s % 16) == 15) begin
        if (!(ready && gnd == g[11:4] && lr == l[11:4] && ud == u[11:4])) begin
          failures++;
          $display("set %0d: ready=%b got %h %h %h want %h %h %h", s, ready, gnd, lr, ud,
                   g[11:4], l[11:4], u[11:4]);
        end
      end else if (ready) begin
        failures++;
        $display("set %0d: unexpected ready", s);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (ready_seen != 20) begin failures++; $display("ready count %0d", ready_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
