// tb_pattern_counter: checks the pre-multiplication window pattern counts.
//
// For each scalar the testbench counts the window values itself, by
// extracting window i as bits [N-1-i*W -: W] (the last window being the
// N mod W lowest bits), and compares all 2^W counters. Scalars: zero, all
// ones, one, random values. Also checks that the count takes exactly one
// cycle per window (done NWIN + 1 cycles after start).
module tb_pattern_counter;
  import ecc_pkg::*;

  localparam int unsigned W     = 3;
  localparam int unsigned NWIN  = (N + W - 1) / W;
  localparam int unsigned LASTW = N - (NWIN - 1) * W;
  localparam int unsigned CW    = $clog2(NWIN + 1);

  logic   clk = 0, rst_n = 0, start = 0;
  fe_t    k;
  logic   busy, done;
  logic [CW-1:0] cnt [2**W];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_counter dut (.clk, .rst_n, .start, .k, .busy, .done, .cnt);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t kk);
    int exp_cnt [2**W];
    int cyc;
    for (int v = 0; v < 2**W; v++) exp_cnt[v] = 0;
    for (int i = 0; i < int'(NWIN); i++) begin
      int v;
      if (i == int'(NWIN) - 1) v = int'(kk & ((fe_t'(1) << LASTW) - 1));
      else                     v = int'((kk >> (int'(N) - (i + 1) * int'(W))) & ((fe_t'(1) << W) - 1));
      exp_cnt[v]++;
    end
    @(negedge clk);
    k = kk; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int v = 0; v < 2**W; v++) begin
      checks++;
      if (int'(cnt[v]) != exp_cnt[v]) begin
        failures++;
        $display("FAIL k=%h pattern %0d: %0d, expected %0d", kk, v, cnt[v], exp_cnt[v]);
      end
    end
    checks++;
    if (cyc != int'(NWIN) + 1) begin
      failures++;
      $display("FAIL count took %0d cycles, expected %0d", cyc, NWIN + 1);
    end
  endtask

  initial begin
    k = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0);
    run('1);
    run(fe_t'(1));
    run(P256_N);
    for (int t = 0; t < 20; t++) begin
      fe_t v;
      for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
