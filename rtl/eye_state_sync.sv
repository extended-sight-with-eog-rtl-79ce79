// eye_state_sync: carries the 6-bit eye state from the 104 MHz processing
// clock to the 65 MHz graphics clock.
//
// A multi-bit value cannot go through plain double flip-flops, so this uses a
// toggle handshake: the source holds the value in a register and flips
// req; the destination passes req through two flip-flops, captures the held
// value when it sees the flip and returns the flip as ack through two more
// flip-flops. A new value is launched only when ack equals req, so the held
// value is stable whenever it is sampled. A change that happens while a
// transfer is in flight is sent as soon as that transfer completes (the
// latest value wins). The design asks only that the state be synchronized;
// the handshake is this design's choice.
//
// Interface: src_clk/src_rst/src_state; dst_clk/dst_rst/dst_state.
// Timing: a change reaches dst_state 3 to 4 destination cycles after it is
// launched; back-to-back transfers take about 3 source plus 3 destination
// cycles each. The eye state changes at most once per 1664 source cycles.
module eye_state_sync (
  input  logic                src_clk,
  input  logic                src_rst,
  input  eog_pkg::eye_state_t src_state,
  input  logic                dst_clk,
  input  logic                dst_rst,
  output eog_pkg::eye_state_t dst_state
);
  import eog_pkg::*;

  eye_state_t held;
  logic       req;
  logic       ack_s1, ack_s2;
  logic       req_d1, req_d2, req_d3;

  // source domain
  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      held   <= EYE_FORWARD;
      req    <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= req_d2;
      ack_s2 <= ack_s1;
      if (ack_s2 == req && src_state != held) begin
        held <= src_state;
        req  <= ~req;
      end
    end
  end

  // destination domain
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_d1    <= 1'b0;
      req_d2    <= 1'b0;
      req_d3    <= 1'b0;
      dst_state <= EYE_FORWARD;
    end else begin
      req_d1 <= req;
      req_d2 <= req_d1;
      req_d3 <= req_d2;
      if (req_d2 != req_d3) dst_state <= held;
    end
  end

  // handshake rule: the held value does not change while a transfer is open
  a_held_stable: assert property (
    @(posedge src_clk) disable iff (src_rst) (req != ack_s2) |=> $stable(held));
endmodule
