// tb_ec_point_add: self-checking test of the complete projective point adder.
//
// Operands are multiples of the P-256 generator computed with the affine
// reference model, given random projective scalings (X:Y:Z) = (lx:ly:l).
// Cases: distinct points, equal points (doubling through the adder), P + (-P),
// and the point at infinity on either side. Each result is compared with the
// affine reference sum; the latency is checked to be the same for every case.
module tb_ec_point_add;
  import ecc_pkg::*;
  import ec_ref_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0;
  point_t p1, p2, r;
  logic   busy, done;
  int     checks = 0, failures = 0;
  int     lat, lat0;

  always #5 clk = ~clk;

  ec_point_add dut (.clk, .rst_n, .start, .p1, .p2, .busy, .done, .r);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic point_t scale(apoint_t a, fe_t l);
    point_t q;
    if (a.inf) begin q = POINT_INF; q.y = l; return q; end
    q.x = rmul(a.x, l, P256_P); q.y = rmul(a.y, l, P256_P); q.z = l;
    return q;
  endfunction

  function automatic fe_t rnd_fe();
    fe_t v;
    for (int i = 0; i < int'(N) / 32; i++) v[i*32 +: 32] = $urandom;
    return v % P256_P;
  endfunction

  task automatic run(apoint_t a, apoint_t b, string what);
    apoint_t e;
    e = aadd(a, b, P256_P);
    @(negedge clk);
    p1 = scale(a, rnd_fe() | 1);
    p2 = scale(b, rnd_fe() | 1);
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

  apoint_t g, g2, pa, pb, inf, ng;
  localparam fe_t G2X = 256'h7CF27B188D034F7E8A52380304B51AC3C08969E277F21B35A60B48FC47669978;
  localparam fe_t G2Y = 256'h07775510DB8ED040293D9AC69F7430DBBA7DADE63CE982299E04B79D227873D1;

  initial begin
    lat0 = 14 * (N + 2) + 29 + 1;
    p1 = POINT_INF; p2 = POINT_INF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    g = gen();
    inf.x = 0; inf.y = 0; inf.inf = 1;
    // sanity of the reference model against the published value of 2G
    g2 = aadd(g, g, P256_P);
    checks++;
    if (g2.x != G2X || g2.y != G2Y || !on_curve(g2, P256_P, P256_B)) begin
      failures++; $display("FAIL reference model: 2G");
    end
    run(g, g, "G+G");
    run(g2, g, "2G+G");
    for (int i = 0; i < 4; i++) begin
      pa = amul(fe_t'($urandom), g, P256_P);
      pb = amul(fe_t'($urandom), g, P256_P);
      run(pa, pb, "random");
    end
    run(pa, pa, "P+P");
    ng = pa; ng.y = P256_P - pa.y;
    run(pa, ng, "P+(-P)");
    run(inf, pb, "inf+P");
    run(pb, inf, "P+inf");
    run(inf, inf, "inf+inf");
    $display("latency %0d cycles", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
