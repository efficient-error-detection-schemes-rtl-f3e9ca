// tb_ec_point_double: self-checking test of the projective point doubler.
//
// Inputs are multiples of the P-256 generator from the affine reference
// model, with random projective scalings, plus the point at infinity. Each
// result is compared with the affine reference double, and the latency with
// the fixed figure 13*(N+2) + 22 cycles.
module tb_ec_point_double;
  import ecc_pkg::*;
  import ec_ref_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0;
  point_t p, r;
  logic   busy, done;
  int     checks = 0, failures = 0;
  int     lat, lat0;

  always #5 clk = ~clk;

  ec_point_double dut (.clk, .rst_n, .start, .p, .busy, .done, .r);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
    return v % P256_P;
  endfunction

  function automatic point_t scale(apoint_t a, fe_t l);
    point_t q;
    if (a.inf) begin q = POINT_INF; q.y = l; return q; end
    q.x = rmul(a.x, l, P256_P); q.y = rmul(a.y, l, P256_P); q.z = l;
    return q;
  endfunction

  task automatic run(apoint_t a, string what);
    apoint_t e;
    e = aadd(a, a, P256_P);
    @(negedge clk);
    p = scale(a, rnd_fe() | 1);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (!proj_eq(r, e, P256_P)) begin
      failures++;
      $display("FAIL %s: r=(%h : %h : %h)", what, r.x, r.y, r.z);
    end
    checks++;
    if (lat != lat0) begin
      failures++;
      $display("FAIL %s: latency %0d, expected %0d", what, lat, lat0);
    end
  endtask

  apoint_t g, pa, inf;

  initial begin
    lat0 = 13 * (N + 2) + 21 + 1;
    p = POINT_INF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    g = gen();
    inf.x = 0; inf.y = 0; inf.inf = 1;
    run(g, "2G");
    for (int i = 0; i < 5; i++) begin
      pa = amul(fe_t'($urandom), g, P256_P);
      run(pa, "random");
    end
    run(inf, "2*inf");
    $display("latency %0d cycles", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
