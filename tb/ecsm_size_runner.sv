// ecsm_size_runner: test driver for one window length of ecsm_window_ed.
//
// Instantiates the top with window length W and runs, after reset: one
// clean multiplication of a random 256-bit scalar by the P-256 generator,
// checked against the affine reference model and against the cycle formula
// (2^W - 1 + z) additions + 256 doublings + 2 cycles per window + 3, where z is
// the number of non-zero windows; then one run with a corrupted window value,
// which must raise `error`. Reports its check and failure counts on its ports
// and raises `finished` at the end.
module ecsm_size_runner
  import ecc_pkg::*;
  import ec_ref_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned NWIN  = (N + W - 1) / W;
  localparam int unsigned LASTW = N - (NWIN - 1) * W;
  localparam int ADD_CYC = 14 * (N + 2) + 30 + 1;
  localparam int DBL_CYC = 13 * (N + 2) + 22 + 1;
  localparam int T_BASE  = (2**W - 1) * ADD_CYC + int'(N) * DBL_CYC + 2 * int'(NWIN) + 3;

  logic   start = 0;
  fe_t    k = '0, px = '0, py = '0;
  logic   fi_en = 0;
  logic [$clog2(NWIN)-1:0] fi_win = '0;
  logic [W-1:0] fi_mask = '0;
  logic   busy, done, error;
  point_t q;

  ecsm_window_ed #(.W(W)) dut (.clk, .rst_n, .start, .k, .px, .py, .fi_en, .fi_win, .fi_mask,
                               .busy, .done, .q, .error);

  function automatic int nz_windows(fe_t kk);
    int c = 0;
    for (int i = 0; i < int'(NWIN); i++) begin
      int lo = (i == int'(NWIN) - 1) ? 0 : int'(N) - (i + 1) * int'(W);
      int wd = (i == int'(NWIN) - 1) ? int'(LASTW) : int'(W);
      if (((kk >> lo) & ((fe_t'(1) << wd) - 1)) != 0) c++;
    end
    return c;
  endfunction

  task automatic run(fe_t kk, bit inject);
    apoint_t e;
    int cyc;
    e = amul(kk, gen(), P256_P);
    @(negedge clk);
    k = kk; px = P256_GX; py = P256_GY;
    fi_en = inject;
    fi_win = ($bits(fi_win))'($urandom_range(NWIN - 1));
    fi_mask = W'($urandom_range(2**W - 1, 1));
    if (int'(fi_win) == int'(NWIN) - 1) fi_mask[0] = 1'b1;   // keep the fault inside a short last window
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (error != inject) begin
      failures++;
      $display("FAIL W=%0d: error=%0d with fault injection %0d", W, error, inject);
    end
    if (!inject) begin
      checks++;
      if (!proj_eq(q, e, P256_P)) begin
        failures++;
        $display("FAIL W=%0d: wrong result", W);
      end
      checks++;
      if (cyc != T_BASE + nz_windows(kk) * ADD_CYC) begin
        failures++;
        $display("FAIL W=%0d: %0d cycles, expected %0d", W, cyc, T_BASE + nz_windows(kk) * ADD_CYC);
      end
    end
    $display("W=%0d %s: %0d cycles, error=%0d", W, inject ? "fault" : "clean", cyc, error);
  endtask

  initial begin
    fe_t v;
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
    run(v, 0);
    for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
    run(v, 1);
    finished = 1;
  end

endmodule
