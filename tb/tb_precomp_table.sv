// tb_precomp_table: writes random points to every entry of the precomputed
// table, then reads them back in random order and checks each against a
// copy kept by the testbench, including that a write changes only its own
// entry and that the read port shows a written entry on the next cycle.
module tb_precomp_table;
  import ecc_pkg::*;

  localparam int unsigned W = 3;

  logic         clk = 0, we = 0;
  logic [W-1:0] waddr = '0, raddr = '0;
  point_t       wdata, rdata;
  point_t       model [2**W];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  precomp_table dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic point_t rnd_point();
    point_t v;
    for (int i = 0; i < $bits(point_t) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic wr(int a, point_t d);
    @(negedge clk);
    we = 1; waddr = W'(a); wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic rd_check(int a);
    raddr = W'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read entry %0d", a);
    end
  endtask

  initial begin
    wdata = '0;
    for (int i = 0; i < 2**W; i++) wr(i, rnd_point());
    for (int i = 0; i < 4 * 2**W; i++) rd_check($urandom_range(2**W - 1));
    // overwrite entries one at a time and check all entries after each write
    for (int j = 0; j < 2**W; j++) begin
      wr(j, rnd_point());
      rd_check(j);
      for (int i = 0; i < 2**W; i++) rd_check(i);
    end
    // we low: no write
    @(negedge clk);
    waddr = 3'd5; wdata = rnd_point();
    @(negedge clk);
    rd_check(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
