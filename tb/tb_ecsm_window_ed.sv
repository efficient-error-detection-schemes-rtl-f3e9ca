// tb_ecsm_window_ed: end-to-end test of the window-method scalar multiplier
// with error detection, at its default parameters (P-256, W = 3).
//
// Each run computes kP and compares it with the affine reference model.
// Scalars: 0, 1, 2, n-1, n (group order), random 256-bit values, on the
// generator and on a random multiple of it. Fault runs corrupt one window
// value through the fault-injection port and must raise `error`; clean runs
// must not. Timing checks: the run time grows by the same fixed amount for
// each non-zero window (one point addition) and the coherency check adds at
// most 6 cycles after the last point operation. A start pulse in the middle
// of one run, with other operands, must be ignored. The mechanisms exercised
// (table writes, doublings, additions, skipped additions for zero windows,
// the short last window, detected faults) are counted, and one that never
// happened counts as a failure.
module tb_ecsm_window_ed;
  import ecc_pkg::*;
  import ec_ref_pkg::*;

  localparam int unsigned W     = 3;
  localparam int unsigned NWIN  = (N + W - 1) / W;
  localparam int unsigned LASTW = N - (NWIN - 1) * W;

  logic   clk = 0, rst_n = 0, start = 0;
  fe_t    k, px, py;
  logic   fi_en = 0;
  logic [$clog2(NWIN)-1:0] fi_win = '0;
  logic [W-1:0] fi_mask = '0;
  logic   busy, done, error;
  point_t q;

  int checks = 0, failures = 0;
  int n_restart = 0, n_tblwr = 0, n_dbl = 0, n_add = 0, n_zero = 0, n_short = 0, n_det = 0, n_clean = 0;
  int cyc, last_op, t0;

  always #5 clk = ~clk;

  ecsm_window_ed dut (.clk, .rst_n, .start, .k, .px, .py, .fi_en, .fi_win, .fi_mask,
                      .busy, .done, .q, .error);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the design's internal strobes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tbl.we)    n_tblwr++;
    if (dut.dbl_start)   n_dbl++;
    if (dut.add_start)   n_add++;
    if (dut.u_chk.inc && dut.wval == '0) n_zero++;
    if (dut.u_chk.inc && dut.wlen != ($bits(dut.wlen))'(W)) n_short++;
    if (dut.add_done || dut.dbl_done) last_op = cyc;
  end

  // number of non-zero windows, worked out from k directly
  function automatic int nz_windows(fe_t kk);
    int c = 0;
    for (int i = 0; i < int'(NWIN); i++) begin
      int lo = (i == int'(NWIN) - 1) ? 0 : int'(N) - (i + 1) * int'(W);
      int wd = (i == int'(NWIN) - 1) ? int'(LASTW) : int'(W);
      if (((kk >> lo) & ((fe_t'(1) << wd) - 1)) != 0) c++;
    end
    return c;
  endfunction

  function automatic fe_t rnd_scalar();
    fe_t v;
    for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // cycle budget: each point operation costs its unit's latency plus one
  // issue cycle; each window costs two control cycles; the table fill adds
  // 2^W - 1 additions; the final table write and the check add 3 cycles.
  localparam int ADD_CYC = 14 * (N + 2) + 30 + 1;
  localparam int DBL_CYC = 13 * (N + 2) + 22 + 1;
  localparam int T_BASE  = (2**W - 1) * ADD_CYC + int'(N) * DBL_CYC + 2 * int'(NWIN) + 3;

  task automatic run(fe_t kk, apoint_t pt, bit inject, string what, bit restart = 0);
    apoint_t e;
    int t;
    e = amul(kk, pt, P256_P);
    @(negedge clk);
    k = kk; px = pt.x; py = pt.y;
    fi_en = inject;
    fi_win = ($bits(fi_win))'($urandom_range(NWIN - 2));
    fi_mask = W'($urandom_range(2**W - 1, 1));
    start = 1;
    cyc = 0;
    @(negedge clk);
    start = 0;
    fi_en = 0;
    while (!done) begin
      @(negedge clk); cyc++;
      // a second start while busy must be ignored
      if (restart) begin
        start = (cyc == 50_000);
        if (cyc == 50_000) begin k = ~kk; px = '0; py = '0; n_restart++; end
      end
    end
    start = 0;
    t = cyc;
    if (inject) begin
      checks++;
      if (!error) begin failures++; $display("FAIL %s: injected fault not detected", what); end
      else n_det++;
    end else begin
      checks++;
      if (error) begin failures++; $display("FAIL %s: false error", what); end
      else n_clean++;
      checks++;
      if (!proj_eq(q, e, P256_P)) begin
        failures++;
        $display("FAIL %s: q=(%h : %h : %h)", what, q.x, q.y, q.z);
      end
      // each non-zero window costs one addition, nothing else depends on k
      checks++;
      if (t != t0 + nz_windows(kk) * ADD_CYC) begin
        failures++;
        $display("FAIL %s: %0d cycles, expected %0d", what, t, t0 + nz_windows(kk) * ADD_CYC);
      end
    end
    checks++;
    if (t - last_op > 6) begin
      failures++;
      $display("FAIL %s: check took %0d cycles after the last point operation", what, t - last_op);
    end
    $display("%-10s k=%h  %0d cycles (check %0d), error=%0d", what, kk, t, t - last_op, error);
  endtask

  apoint_t g, pr;

  initial begin
    k = '0; px = '0; py = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    g = gen();
    t0 = T_BASE;
    run('0, g, 0, "k=0");
    run(fe_t'(1), g, 0, "k=1");
    run(fe_t'(2), g, 0, "k=2");
    run(P256_N - 1, g, 0, "k=n-1");
    run(P256_N, g, 0, "k=n");
    run(rnd_scalar(), g, 0, "random");
    pr = amul(fe_t'($urandom), g, P256_P);
    run(rnd_scalar(), pr, 0, "random P");
    run(rnd_scalar(), g, 1, "fault");
    run(rnd_scalar(), pr, 1, "fault P");
    run(rnd_scalar(), g, 0, "recovered", 1);

    // every mechanism must have happened
    checks++; if (n_tblwr == 0) begin failures++; $display("FAIL no table write"); end
    checks++; if (n_dbl   == 0) begin failures++; $display("FAIL no doubling"); end
    checks++; if (n_add   == 0) begin failures++; $display("FAIL no addition"); end
    checks++; if (n_zero  == 0) begin failures++; $display("FAIL no skipped addition"); end
    checks++; if (n_short == 0) begin failures++; $display("FAIL no short last window"); end
    checks++; if (n_det   == 0) begin failures++; $display("FAIL no fault detected"); end
    checks++; if (n_clean == 0) begin failures++; $display("FAIL no clean run"); end
    checks++; if (n_restart == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("table writes %0d, doublings %0d, additions %0d, zero windows %0d, short windows %0d, detected %0d, clean %0d, ignored starts %0d",
             n_tblwr, n_dbl, n_add, n_zero, n_short, n_det, n_clean, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
