// pattern_counter: counts how often each W-bit pattern occurs among the
// windows of the scalar, before the scalar multiplication starts.
//
// This is the "pre" half of the coherency check. The scalar is split, from
// its most significant bit down, into windows of W bits; when W does not
// divide N the last window is the N mod W low bits. Every window, whatever
// its value (zero included), adds one to the counter of its value, so the
// counts always sum to the number of windows.
//
// Hardware: the scalar is loaded into a shift register; each clock the top W
// bits are decoded, the matching counter is incremented and the register
// moves W places, so the count takes one cycle per window
// (ceil(N/W) = 86 cycles for N = 256, W = 3; `done` comes ceil(N/W) + 1
// cycles after `start`) and runs in the shadow of the
// table precomputation.
//
// Interface: pulse `start` with k valid; `busy` is high while counting,
// `done` pulses once when `cnt` is final. `cnt` holds its value until the
// next start.
//
// What is counted follows the published scheme's pattern-counting routine,
// with one change of this design: the short last window is counted as well,
// as the main loop processes and counts it too. The one-window-per-clock
// schedule is this design's.
module pattern_counter
  import ecc_pkg::*;
#(
  parameter int unsigned W = 3   // window length
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fe_t    k,
  output logic   busy,
  output logic   done,
  output logic [$clog2((N+W-1)/W+1)-1:0] cnt [2**W]
);

  localparam int unsigned NWIN  = (N + W - 1) / W;        // windows per scalar
  localparam int unsigned LASTW = N - (NWIN - 1) * W;     // width of the last window
  localparam int unsigned WCW   = $clog2(NWIN + 1);

  fe_t          kreg;
  logic [WCW-1:0] left;      // windows still to count
  logic [W-1:0] value;

  // value of the current window: a full window, or the short last one
  always_comb begin
    if (left == WCW'(1)) value = W'(kreg[N-1 -: W] >> (W - LASTW));
    else                 value = kreg[N-1 -: W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kreg <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < 2**W; i++) cnt[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        kreg <= k;
        left <= WCW'(NWIN);
        busy <= 1'b1;
        for (int i = 0; i < 2**W; i++) cnt[i] <= '0;
      end else if (busy) begin
        cnt[value] <= cnt[value] + 1'b1;
        kreg <= kreg << W;
        left <= left - 1'b1;
        if (left == WCW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
