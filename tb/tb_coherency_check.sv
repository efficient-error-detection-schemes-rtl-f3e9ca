// tb_coherency_check: drives the post pattern counter with window value
// sequences and checks the comparison with given pre counts.
//
// For each trial the testbench draws a random sequence of window values,
// counts it itself as the pre counts, replays it through `inc`, and expects
// no error; then it replays it with one value changed, one value dropped or
// one value repeated, and expects an error each time. It also checks the
// post counters themselves and the one-cycle result latency.
module tb_coherency_check;
  import ecc_pkg::*;

  localparam int unsigned W    = 3;
  localparam int unsigned NWIN = (N + W - 1) / W;
  localparam int unsigned CW   = $clog2(NWIN + 1);

  logic          clk = 0, rst_n = 0, clr = 0, inc = 0, check = 0;
  logic [W-1:0]  value = '0;
  logic [CW-1:0] pre_cnt  [2**W];
  logic [CW-1:0] post_cnt [2**W];
  logic          err_valid, err;
  int            checks = 0, failures = 0;
  int            seq [NWIN];

  always #5 clk = ~clk;

  coherency_check dut (.clk, .rst_n, .clr, .inc, .value, .pre_cnt, .check,
                                .post_cnt, .err_valid, .err);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: exact replay, 1: one value changed, 2: one dropped, 3: one extra
  task automatic replay(int mode, bit expect_err);
    int pos, cnt_model [2**W];
    pos = $urandom_range(NWIN - 1);
    for (int v = 0; v < 2**W; v++) cnt_model[v] = 0;
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int i = 0; i < int'(NWIN); i++) begin
      int v = seq[i];
      if (mode == 2 && i == pos) continue;
      if (mode == 1 && i == pos) v = (v + $urandom_range(2**W - 1, 1)) % (2**W);
      inc = 1; value = W'(v); cnt_model[v]++;
      @(negedge clk);
      if (mode == 3 && i == pos) begin cnt_model[v]++; @(negedge clk); end
    end
    inc = 0;
    for (int v = 0; v < 2**W; v++) begin
      checks++;
      if (int'(post_cnt[v]) != cnt_model[v]) begin
        failures++; $display("FAIL post count %0d: %0d, expected %0d", v, post_cnt[v], cnt_model[v]);
      end
    end
    check = 1;
    @(negedge clk);
    check = 0;
    checks++;
    if (!err_valid || err != expect_err) begin
      failures++;
      $display("FAIL mode %0d: err_valid=%0d err=%0d, expected err=%0d", mode, err_valid, err, expect_err);
    end
  endtask

  initial begin
    for (int v = 0; v < 2**W; v++) pre_cnt[v] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      for (int v = 0; v < 2**W; v++) pre_cnt[v] = '0;
      for (int i = 0; i < int'(NWIN); i++) begin
        seq[i] = $urandom_range(2**W - 1);
        pre_cnt[seq[i]] = pre_cnt[seq[i]] + 1'b1;
      end
      replay(0, 0);
      replay(1, 1);
      replay(2, 1);
      replay(3, 1);
      replay(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
