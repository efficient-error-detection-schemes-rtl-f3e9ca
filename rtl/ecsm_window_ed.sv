// ecsm_window_ed: window-method elliptic-curve scalar multiplication Q = kP
// with a pattern-count coherency check that flags faults in the algorithm's
// control flow.
//
// Operation, in order:
//   1. Precomputation. The table is filled with P, 2P, ..., (2^W)P by
//      repeated addition of P (2^W - 1 point additions). At the same time,
//      pattern_counter counts how often each W-bit value occurs among the
//      windows of k (the "pre" counts).
//   2. Main loop. Starting from the point at infinity, for each window of k,
//      most significant first: the result is doubled once per bit of the
//      window, and, if the window value v is non-zero, table entry v-1 (= vP)
//      is added. Each window value used is counted again in
//      coherency_check (the "post" counts). The last window is N mod W bits
//      wide when W does not divide N (one bit for N = 256, W = 3).
//   3. Check. The pre and post counts are compared; `error` is raised on any
//      difference. The check adds 4 cycles after the last point operation.
//
// The scalar is always processed at its full N-bit width, leading zeros
// included, so the sequence of point operations depends only on the window
// values, never on the length of k.
//
// Interface: pulse `start` with k and the affine base point (px, py) valid.
// `busy` is high until `done` pulses for one cycle; then `q` holds kP in
// projective coordinates (X:Y:Z), x = X/Z and y = Y/Z, with Z = 0 for the
// point at infinity, and `error` tells whether the check failed (the result
// must then be discarded). `q` and `error` hold until the next start.
//
// Fault-injection inputs (for evaluation, tie fi_en low in use): when fi_en
// is set at start, the value of window number fi_win (0 = most significant)
// is XORed with fi_mask inside the main loop, modelling a fault in the
// window extraction.
//
// The algorithm, the pre/post pattern counts and the comparison follow the
// published window-method error-detection scheme; the curve (P-256), projective coordinates, the serial
// microcoded point units and the fault-injection port are this design's.
module ecsm_window_ed
  import ecc_pkg::*;
#(
  parameter int unsigned W      = 3,        // window length
  parameter fe_t         P_MOD  = P256_P,   // field prime
  parameter fe_t         B_COEF = P256_B    // curve coefficient b (a = -3)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  fe_t                                 k,
  input  fe_t                                 px,
  input  fe_t                                 py,
  input  logic                                fi_en,
  input  logic [$clog2((N+W-1)/W)-1:0]        fi_win,
  input  logic [W-1:0]                        fi_mask,
  output logic                                busy,
  output logic                                done,
  output point_t                              q,
  output logic                                error
);

  localparam int unsigned NWIN  = (N + W - 1) / W;     // windows per scalar
  localparam int unsigned LASTW = N - (NWIN - 1) * W;  // width of the last window
  localparam int unsigned XW    = $clog2(NWIN);        // window index width
  localparam int unsigned CW    = $clog2(NWIN + 1);    // pattern counter width
  localparam int unsigned LW    = $clog2(W + 1);       // window length width

  typedef enum logic [3:0] {
    S_IDLE, S_PRE_WR, S_PRE_WAIT, S_WIN, S_DBL, S_DBL_WAIT,
    S_ADD, S_ADD_WAIT, S_NEXT, S_CHECK, S_FIN
  } state_e;

  state_e        state;
  fe_t           kreg;
  point_t        base, cur, res;
  logic [W-1:0]  idx;          // precomputation index
  logic [XW-1:0] win;          // window index
  logic [W-1:0]  value_r;      // current window value
  logic [LW-1:0] dleft;        // doublings left in this window
  logic          fi_en_r;
  logic [XW-1:0] fi_win_r;
  logic [W-1:0]  fi_mask_r;
  logic          pre_done;     // pre pattern count finished

  // window extraction (combinational, used in S_WIN)
  logic [LW-1:0] wlen;
  logic [W-1:0]  wval, wmask;
  always_comb begin
    if (win == XW'(NWIN - 1)) begin
      wlen  = LW'(LASTW);
      wval  = W'(kreg[N-1 -: W] >> (W - LASTW));
      wmask = W'((1 << LASTW) - 1);
    end else begin
      wlen  = LW'(W);
      wval  = kreg[N-1 -: W];
      wmask = '1;
    end
    if (fi_en_r && win == fi_win_r) wval = wval ^ (fi_mask_r & wmask);
  end

  // ---------------- point units ----------------
  logic   add_start, add_done, add_busy;
  point_t add_p1, add_p2, add_r;
  logic   dbl_start, dbl_done, dbl_busy;
  point_t dbl_r;

  ec_point_add #(.P_MOD(P_MOD), .B_COEF(B_COEF)) u_add (
    .clk, .rst_n, .start(add_start), .p1(add_p1), .p2(add_p2),
    .busy(add_busy), .done(add_done), .r(add_r)
  );

  ec_point_double #(.P_MOD(P_MOD), .B_COEF(B_COEF)) u_dbl (
    .clk, .rst_n, .start(dbl_start), .p(res),
    .busy(dbl_busy), .done(dbl_done), .r(dbl_r)
  );

  // ---------------- precomputed table ----------------
  point_t       tbl_rdata;
  logic [W-1:0] tbl_raddr;

  assign tbl_raddr = value_r - 1'b1;

  precomp_table #(.W(W)) u_tbl (
    .clk, .we(state == S_PRE_WR), .waddr(idx), .wdata(cur),
    .raddr(tbl_raddr), .rdata(tbl_rdata)
  );

  // adder operands: P + current during precomputation, result + table later
  assign add_p1 = (state == S_ADD) ? res       : base;
  assign add_p2 = (state == S_ADD) ? tbl_rdata : cur;

  assign add_start = (state == S_ADD) ||
                     (state == S_PRE_WR && idx != W'(2**W - 1));
  assign dbl_start = (state == S_DBL);

  // ---------------- coherency check ----------------
  logic [CW-1:0] pre_cnt  [2**W];
  logic [CW-1:0] post_cnt [2**W];
  logic          pc_done, chk_valid, chk_err;

  pattern_counter #(.W(W)) u_pre (
    .clk, .rst_n, .start(state == S_IDLE && start), .k(k),
    .busy(), .done(pc_done), .cnt(pre_cnt)
  );

  coherency_check #(.W(W)) u_chk (
    .clk, .rst_n, .clr(state == S_IDLE && start), .inc(state == S_WIN),
    .value(wval), .pre_cnt(pre_cnt), .check(state == S_CHECK && pre_done),
    .post_cnt(post_cnt), .err_valid(chk_valid), .err(chk_err)
  );

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      kreg      <= '0;
      base      <= POINT_INF;
      cur       <= POINT_INF;
      res       <= POINT_INF;
      idx       <= '0;
      win       <= '0;
      value_r   <= '0;
      dleft     <= '0;
      fi_en_r   <= 1'b0;
      fi_win_r  <= '0;
      fi_mask_r <= '0;
      pre_done  <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
      q         <= POINT_INF;
    end else begin
      done <= 1'b0;
      if (pc_done) pre_done <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          kreg      <= k;
          base      <= '{x: px, y: py, z: fe_t'(1)};
          cur       <= '{x: px, y: py, z: fe_t'(1)};
          res       <= POINT_INF;
          idx       <= '0;
          win       <= '0;
          fi_en_r   <= fi_en;
          fi_win_r  <= fi_win;
          fi_mask_r <= fi_mask;
          pre_done  <= 1'b0;
          state     <= S_PRE_WR;
        end
        // table[idx] = current; then current = P + current
        S_PRE_WR: begin
          if (idx == W'(2**W - 1)) state <= S_WIN;
          else                     state <= S_PRE_WAIT;
        end
        S_PRE_WAIT: if (add_done) begin
          cur   <= add_r;
          idx   <= idx + 1'b1;
          state <= S_PRE_WR;
        end
        // take the next window of the scalar
        S_WIN: begin
          value_r <= wval;
          dleft   <= wlen;
          kreg    <= kreg << wlen;
          state   <= S_DBL;
        end
        S_DBL: state <= S_DBL_WAIT;
        S_DBL_WAIT: if (dbl_done) begin
          res   <= dbl_r;
          dleft <= dleft - 1'b1;
          if (dleft != LW'(1))      state <= S_DBL;
          else if (value_r != '0)   state <= S_ADD;
          else                      state <= S_NEXT;
        end
        S_ADD: state <= S_ADD_WAIT;
        S_ADD_WAIT: if (add_done) begin
          res   <= add_r;
          state <= S_NEXT;
        end
        S_NEXT: begin
          win <= win + 1'b1;
          if (win == XW'(NWIN - 1)) state <= S_CHECK;
          else                      state <= S_WIN;
        end
        // compare pre and post pattern counts
        S_CHECK: if (pre_done) state <= S_FIN;
        S_FIN: if (chk_valid) begin
          q     <= res;
          error <= chk_err;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a point unit is only started when it is idle
  assert property (@(posedge clk) disable iff (!rst_n) add_start |-> !add_busy);
  assert property (@(posedge clk) disable iff (!rst_n) dbl_start |-> !dbl_busy);
  // a non-zero window always has a table entry
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_ADD |-> value_r != '0);

endmodule
