// feature_detect: gaze classification with one second of look-ahead.
//
// Every filtered sample pair is written into two 8-bit x 2**DEPTH_LOG2
// memories (64k deep by default: 1.05 s at 62.5 kS/s) that act as a delay
// line; the sample read back, written 2**DEPTH_LOG2 samples earlier, is
// classified by fixed cutoffs into Left, Right, Up, Down, Closed or Forward.
// The delay lets the block see how each eye closure ends before it reports
// it: a closure shorter than LONG_CLOSE samples is a blink and is replaced by
// the state reported just before it; a longer one is reported as Closed.
// The delay, the two 8x64k memories, the cutoff classification and the blink
// replacement follow the design description. The cutoffs, the blink length
// and the way long closures are found are this design's own:
// the newest samples are classified as they arrive; when a run of closed
// samples reaches LONG_CLOSE, the run's first and (growing) last sample
// numbers are queued, and the delayed sample is reported Closed when its
// number falls inside the interval at the head of the queue.
//
// Interface (clk = 104 MHz): in_valid/lr/ud from the filter; eye_state
// (one-hot, see eog_pkg) with a one-cycle out_valid pulse per input sample.
// Until the memories have been filled once, Forward is reported.
// Timing: the state for an input sample appears 2**DEPTH_LOG2 samples later,
// two cycles after the in_valid that pushes it out.
module feature_detect #(
  parameter int unsigned DEPTH_LOG2 = 16,
  parameter int unsigned LONG_CLOSE = 31250,   // 0.5 s at 62.5 kS/s
  parameter int          TH_H       = 30,
  parameter int          TH_V       = 30,
  parameter int          TH_CLOSED  = 90,
  parameter int unsigned QDEPTH     = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] lr,
  input  logic signed [7:0] ud,
  output eog_pkg::eye_state_t eye_state,
  output logic              out_valid
);
  import eog_pkg::*;

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  localparam int unsigned QW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  // delay memories
  logic signed [7:0] lr_mem [DEPTH];
  logic signed [7:0] ud_mem [DEPTH];
  logic [DEPTH_LOG2-1:0] wr_ptr;
  logic signed [7:0] lr_old, ud_old;
  logic              filled;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lr_old         <= lr_mem[wr_ptr];
      ud_old         <= ud_mem[wr_ptr];
      lr_mem[wr_ptr] <= lr;
      ud_mem[wr_ptr] <= ud;
    end
  end

  // sample numbers: head = newest sample, tail = head - DEPTH
  logic [31:0] head_idx, tail_idx;
  logic        tail_valid;   // cycle after in_valid: lr_old/ud_old hold the tail

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      filled     <= 1'b0;
      head_idx   <= '0;
      tail_idx   <= '0;
      tail_valid <= 1'b0;
    end else begin
      tail_valid <= in_valid && filled;
      if (in_valid) begin
        wr_ptr   <= wr_ptr + 1'b1;
        tail_idx <= head_idx - 32'(DEPTH);
        head_idx <= head_idx + 1;
        if (wr_ptr == '1) filled <= 1'b1;
      end
    end
  end

  // long-closure detection on the newest samples
  logic        head_closed;
  logic [31:0] run_len;
  logic [31:0] q_start [QDEPTH];
  logic [31:0] q_end   [QDEPTH];
  logic [QW-1:0] q_rd, q_wr;
  logic [QW:0]   q_cnt;
  logic          growing;   // newest queue entry is still being extended
  logic          q_pop;

  assign head_closed = (classify_gaze(lr, ud, TH_H, TH_V, TH_CLOSED) == EYE_CLOSED);

  // is the tail sample inside the oldest queued interval?
  logic tail_in_long;
  assign tail_in_long = (q_cnt != 0) &&
                        ((tail_idx - q_start[q_rd]) <= (q_end[q_rd] - q_start[q_rd]));
  assign q_pop = tail_valid && (q_cnt != 0) && (tail_idx == q_end[q_rd]) &&
                 !(growing && q_cnt == 1);

  logic q_push;
  assign q_push = in_valid && head_closed && (run_len == 32'(LONG_CLOSE - 1)) &&
                  (q_cnt != (QW+1)'(QDEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      run_len <= '0;
      q_rd    <= '0;
      q_wr    <= '0;
      q_cnt   <= '0;
      growing <= 1'b0;
      for (int i = 0; i < int'(QDEPTH); i++) begin
        q_start[i] <= '0;
        q_end[i]   <= '0;
      end
    end else begin
      if (in_valid) begin
        if (head_closed) begin
          if (run_len != '1) run_len <= run_len + 1;
        end else begin
          run_len <= '0;
          growing <= 1'b0;
        end
        if (q_push) begin
          q_start[q_wr] <= head_idx - 32'(LONG_CLOSE - 1);
          q_end[q_wr]   <= head_idx;
          q_wr          <= (q_wr == QW'(QDEPTH - 1)) ? '0 : q_wr + 1'b1;
          growing       <= 1'b1;
        end else if (growing && head_closed) begin
          q_end[(q_wr == '0) ? QW'(QDEPTH - 1) : q_wr - 1'b1] <= head_idx;
        end
      end
      if (q_pop) q_rd <= (q_rd == QW'(QDEPTH - 1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);
    end
  end

  // the interval queue never runs over or under
  a_queue_bounds: assert property (@(posedge clk) disable iff (rst)
    (q_cnt <= (QW+1)'(QDEPTH)) && !(q_pop && q_cnt == 0));

  // classification of the delayed sample and blink replacement
  eye_state_t tail_state;
  assign tail_state = classify_gaze(lr_old, ud_old, TH_H, TH_V, TH_CLOSED);

  always_ff @(posedge clk) begin
    if (rst) begin
      eye_state <= EYE_FORWARD;
      out_valid <= 1'b0;
    end else begin
      out_valid <= tail_valid;
      if (tail_valid) begin
        if (tail_state != EYE_CLOSED) eye_state <= tail_state;
        else if (tail_in_long)        eye_state <= EYE_CLOSED;
        // else: blink, keep the previous state
      end
    end
  end
endmodule
