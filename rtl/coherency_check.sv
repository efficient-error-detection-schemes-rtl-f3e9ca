// coherency_check: the "post" pattern counter and the final comparison of
// the window-method error detection.
//
// While the main loop runs, each window value it actually acts on is
// counted here (`inc` with `value`). When the loop has finished, `check`
// compares these counts with the counts taken from the scalar beforehand
// (pre_cnt, from pattern_counter). Any difference means that the loop did
// not process the scalar it was given: a window value, a window position or
// the loop count was corrupted. The result is registered: `err_valid`
// pulses one cycle after `check`, with `err` high on a mismatch.
//
// Interface: `clr` zeroes the counts (start of a multiplication); `inc`
// adds one to the counter of `value`; `check` samples the comparison.
// `post_cnt` is visible for debugging.
//
// Counting every window value, zero included, and comparing all counters
// follows the published scheme; reporting the outcome as a flag next to the
// result, one cycle after `check`, is this design's choice.
module coherency_check
  import ecc_pkg::*;
#(
  parameter int unsigned W = 3   // window length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  input  logic [W-1:0] value,
  input  logic [$clog2((N+W-1)/W+1)-1:0] pre_cnt  [2**W],
  input  logic         check,
  output logic [$clog2((N+W-1)/W+1)-1:0] post_cnt [2**W],
  output logic         err_valid,
  output logic         err
);

  logic mismatch;

  always_comb begin
    mismatch = 1'b0;
    for (int i = 0; i < 2**W; i++)
      if (post_cnt[i] != pre_cnt[i]) mismatch = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      err       <= 1'b0;
      for (int i = 0; i < 2**W; i++) post_cnt[i] <= '0;
    end else begin
      err_valid <= check;
      if (check) err <= mismatch;
      if (clr) begin
        for (int i = 0; i < 2**W; i++) post_cnt[i] <= '0;
      end else if (inc) begin
        post_cnt[value] <= post_cnt[value] + 1'b1;
      end
    end
  end

endmodule
